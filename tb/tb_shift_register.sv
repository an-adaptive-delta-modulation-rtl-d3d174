// tb_shift_register: random bits with random gaps between samples. The
// SIPO contents are compared with a history kept by the testbench, the
// PIPO must load exactly every fourth sample with the last four bits, and
// nothing may change on clocks without sample_en.
module tb_shift_register;
  logic clk = 0, rst = 1, sample_en = 0, bit_in = 0;
  logic [3:0] sipo, pipo;
  logic word_load, pipo_valid;
  int checks = 0, failures = 0, cycle = 0;
  logic [3:0] hist = 0, exp_pipo = 0;
  int nsamp = 0, loads = 0;

  shift_register #(.WORD_LEN(4)) dut (.clk, .rst, .sample_en, .bit_in, .sipo, .pipo, .word_load, .pipo_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(pipo_valid == 0 && sipo == 0, "reset");
    for (int i = 0; i < 2000; i++) begin
      sample_en = ($urandom_range(0, 2) != 0);
      bit_in = 1'($urandom);
      #1;
      chk(word_load == (sample_en && (nsamp % 4 == 3)), "word_load timing");
      @(posedge clk);
      if (sample_en) begin
        hist = {bit_in, hist[3:1]};
        if (nsamp % 4 == 3) begin exp_pipo = hist; loads++; end
        nsamp++;
      end
      #1;
      chk(sipo == hist, "sipo");
      chk(pipo == exp_pipo, "pipo");
      chk(pipo_valid == (nsamp >= 4), "pipo_valid");
    end
    chk(loads == nsamp / 4, "load count = samples/4");
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
