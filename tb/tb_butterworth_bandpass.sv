// tb_butterworth_bandpass: amplitude response of the band-pass filter at
// a 17 kHz sample rate. Sines of 1000 LSB are applied at 50, 300, 1000,
// 3400 and 7000 Hz; after the transient the output peak must be about
// unity gain in the pass band, about -3 dB (0.707) at both band edges and
// small outside the band. A constant input must die out, and the output
// may not change on clocks without a sample.
module tb_butterworth_bandpass;
  logic clk = 0, rst = 1, sample_en = 0;
  logic signed [11:0] x = 0, y;
  int checks = 0, failures = 0;

  butterworth_bandpass dut (.clk, .rst, .sample_en, .x, .y);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs n samples of a sine of frequency f (Hz) or, for f = 0, a constant
  // 1000; returns the output peak over the last quarter of the run.
  task automatic run(input real f, input int n, output real gain);
    int peak = 0;
    logic signed [11:0] y_hold;
    for (int i = 0; i < n; i++) begin
      x = (f == 0.0) ? 12'sd1000 : 12'($rtoi(1000.0 * $sin(2.0 * 3.14159265 * f * i / 17000.0)));
      #1 sample_en = 1;
      @(posedge clk);
      #1 sample_en = 0;
      y_hold = y;
      @(posedge clk);
      #1;
      checks++;
      if (y != y_hold) begin failures++; $display("FAIL output moved without a sample"); end
      if (i >= 3 * n / 4) begin
        if (int'(y) > peak) peak = int'(y);
        if (-int'(y) > peak) peak = -int'(y);
      end
    end
    gain = peak / 1000.0;
    $display("f=%0.0f Hz gain %0.3f", f, gain);
  endtask

  initial begin
    real g;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(1000.0, 1200, g); chk(g > 0.90 && g < 1.06, "pass band gain at 1000 Hz");
    run(300.0,  3000, g); chk(g > 0.62 && g < 0.80, "-3 dB at 300 Hz");
    run(3400.0, 1200, g); chk(g > 0.62 && g < 0.80, "-3 dB at 3400 Hz");
    run(50.0,   8000, g); chk(g < 0.10, "stop band at 50 Hz");
    run(7000.0, 1200, g); chk(g < 0.25, "stop band at 7000 Hz");
    run(0.0,    3000, g); chk(g < 0.01, "no DC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
