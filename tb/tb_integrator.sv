// tb_integrator: random bits and step sizes with random sample gaps; the
// output must be the running sum of +-delta clipped to 12 bits, and both
// rails must be reached.
module tb_integrator;
  import adm_tb_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0, bit_in = 0;
  logic signed [11:0] delta = 0, r;
  int checks = 0, failures = 0, exp_r = 0, top = 0, bot = 0;

  integrator #(.DATA_W(12)) dut (.clk, .rst, .sample_en, .bit_in, .delta, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (r != 0) failures++;
    for (int i = 0; i < 4000; i++) begin
      sample_en = ($urandom_range(0, 3) != 0);
      // long runs of one polarity drive the output into both rails
      bit_in = ((i / 500) % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      delta = 12'($urandom_range(32, 256));
      @(posedge clk);
      if (sample_en) exp_r = clamp(bit_in ? exp_r + int'(delta) : exp_r - int'(delta), -2048, 2047);
      #1;
      checks++;
      if (int'(r) != exp_r) begin failures++; $display("FAIL i=%0d r=%0d exp=%0d", i, r, exp_r); end
      if (exp_r == 2047) top++;
      if (exp_r == -2048) bot++;
    end
    checks += 2;
    if (top == 0) failures++;
    if (bot == 0) failures++;
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
