// tb_quantiser_sampler: random and equal x, r pairs; bit_now must be
// (x - r >= 0), and bit_out must take that value on a sampling edge and
// hold it otherwise.
module tb_quantiser_sampler;
  logic clk = 0, rst = 1, sample_en = 0;
  logic signed [11:0] x = 0, r = 0;
  logic bit_now, bit_out, bit_valid;
  int checks = 0, failures = 0;
  bit exp_q = 0;

  quantiser_sampler #(.DATA_W(12)) dut (.clk, .rst, .sample_en, .x, .r, .bit_now, .bit_out, .bit_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (bit_valid || bit_out) failures++;
    for (int i = 0; i < 3000; i++) begin
      sample_en = 1'($urandom);
      x = 12'($urandom);
      r = (i % 7 == 0) ? x : 12'($urandom);
      #1;
      checks++;
      if (bit_now != (int'(x) - int'(r) >= 0)) begin failures++; $display("FAIL bit_now x=%0d r=%0d", x, r); end
      @(posedge clk);
      if (sample_en) exp_q = (int'(x) - int'(r) >= 0);
      #1;
      checks++;
      if (bit_out != exp_q) begin failures++; $display("FAIL bit_out i=%0d", i); end
    end
    checks++; if (!bit_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
