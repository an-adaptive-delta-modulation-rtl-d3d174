// tb_adm_modulator: closed-loop check of the modulator. A sine wave of
// rising amplitude is sampled once every three clocks; the testbench runs
// its own model of the loop (quantiser, step-size path, integrator) on the
// band-passed input x_filt and
// compares the transmitted bit, the estimate r and the step size with it
// after every sample. The estimate must also stay close to the input once
// the loop has locked.
module tb_adm_modulator;
  import adm_tb_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0;
  logic signed [11:0] x = 0, x_filt, r, delta, k_delta;
  logic bit_out, bit_valid, word_load;
  logic [4:0] c;
  int checks = 0, failures = 0, worst = 0;
  adm_ref m;

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  adm_modulator #(.DATA_W(12), .DELTA0(32), .DELTA_MIN(32), .DELTA_MAX(256)) dut (
    .clk, .rst, .sample_en, .x, .x_filt, .bit_out, .bit_valid, .r, .delta, .c, .k_delta, .word_load);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what, input int n);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s sample %0d r=%0d mr=%0d d=%0d md=%0d x=%0d t=%0t", what, n, r, m.r, delta, m.delta, x, $time); end
  endtask

  initial begin
    bit b;
    real amp;
    m = new(32, 256, 12);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      // 1 kHz at 17 kHz sampling, amplitude rising from 1 V to 5 V (64 LSB/V)
      amp = 64.0 * (1.0 + 4.0 * n / 3000.0);
      x = 12'($rtoi(amp * $sin(2.0 * 3.14159265 * 1000.0 * n / 17000.0)));
      repeat (2) @(posedge clk);
      #1 sample_en = 1;
      b = (int'(x_filt) - m.r >= 0);
      chk(int'(r) == m.r, "r before sample", n);
      @(posedge clk);
      m.step(b);
      #1 sample_en = 0;
      @(negedge clk);
      chk(bit_out == b, "bit_out", n);
      chk(int'(r) == m.r, "r", n);
      chk(int'(delta) == m.delta, "delta", n);
      chk(n < 2 || iabs(int'(x_filt)) > 0, "input filter passes the sine", n);
      if (n > 200 && iabs(int'(x_filt) - int'(r)) > worst) worst = iabs(int'(x_filt) - int'(r));
    end
    // locked loop: error within a few maximum steps (4 V = 256 LSB)
    chk(worst < 3 * 256, "tracking error", 0);
    $display("worst tracking error %0d LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
