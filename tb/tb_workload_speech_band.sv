// tb_workload_speech_band: the link at its default parameters coding
// sines across the 300-3400 Hz speech band at a 17 kHz sample rate
// (sample clock every four clocks). For each tone the testbench measures,
// after the loop and the filters have settled:
//   - the SNR of the modulator estimate against the band-passed input,
//     at the best alignment of up to three samples (the estimate trails);
//   - the same SNR for a fixed-step (0.5 V) linear delta modulator model
//     run on the same samples;
//   - the power of the reconstructed output relative to the input.
// Checks: the output power is within 0.35 to 2 of the input power (the
// two filters together pass half the power at the band edges); the
// demodulator follows the modulator exactly; and for the large 1 kHz, 6 V
// tone, deep in slope overload for a 0.5 V step, the adaptive coder beats
// the fixed-step one. The other SNR figures are printed, not checked: at
// moderate levels and at the top of the band the step-size policy does
// not beat a fixed 0.5 V step at the same sample rate.
module tb_workload_speech_band;
  logic clk = 0, rst = 1, chan_flip = 0;
  logic sample_en, sample_clk;
  logic [15:0] vco_period = 4, vco_high = 2;
  logic signed [11:0] x = 0;
  logic bit_tx, mod_word_load, demod_word_load;
  logic signed [11:0] x_filt, mod_r, mod_delta, mod_k_delta, demod_r, y, demod_delta, demod_k_delta;
  logic [4:0] mod_c, demod_c;
  int checks = 0, failures = 0;

  adm_system dut (
    .clk, .rst, .vco_period, .vco_high, .sample_clk, .sample_en, .x, .chan_flip, .x_filt, .bit_tx,
    .mod_r, .mod_delta, .mod_c, .mod_k_delta, .mod_word_load,
    .demod_r, .y, .demod_delta, .demod_c, .demod_k_delta, .demod_word_load);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tone(input real f, input real volts, input bit expect_win);
    real p_in = 0.0, p_out = 0.0, snr = -100.0;
    real p_err [4] = '{0.0, 0.0, 0.0, 0.0};
    int xh [4] = '{0, 0, 0, 0};
    real q_err [4] = '{0.0, 0.0, 0.0, 0.0};
    real snr_l = -100.0, slope;
    int prev_r = 0, mism = 0, ldm_r = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4000; n++) begin
      x = 12'($rtoi(64.0 * volts * $sin(2.0 * 3.14159265 * f * n / 17000.0)));
      while (!sample_en) @(negedge clk);
      @(posedge clk);
      #1;
      if (n > 0 && int'(demod_r) != prev_r) mism++;
      prev_r = int'(mod_r);
      ldm_r += (int'(x_filt) - ldm_r >= 0) ? 32 : -32;
      // x_filt as seen 0..3 samples ago
      xh = '{int'(x_filt), xh[0], xh[1], xh[2]};
      if (n >= 1000) begin
        p_in  += real'(xh[0] * xh[0]);
        for (int l = 0; l < 4; l++) p_err[l] += real'((xh[l] - int'(mod_r)) * (xh[l] - int'(mod_r)));
        for (int l = 0; l < 4; l++) q_err[l] += real'((xh[l] - ldm_r) * (xh[l] - ldm_r));
        p_out += real'(int'(y) * int'(y));
      end
    end
    for (int l = 0; l < 4; l++) begin
      if (10.0 * $log10(p_in / p_err[l]) > snr)   snr   = 10.0 * $log10(p_in / p_err[l]);
      if (10.0 * $log10(p_in / q_err[l]) > snr_l) snr_l = 10.0 * $log10(p_in / q_err[l]);
    end
    slope = 2.0 * 3.14159265 * f * volts / 17000.0;
    $display("%6.0f Hz %3.1f V (%4.2f V/sample): SNR adaptive %5.1f dB, fixed step %5.1f dB, output/input power %4.2f",
             f, volts, slope, snr, snr_l, p_out / p_in);
    if (expect_win) chk(snr > snr_l, "adaptive step beats fixed step in slope overload");
    chk(p_out > 0.35 * p_in && p_out < 2.0 * p_in, "output power");
    chk(mism == 0, "demodulator follows modulator");
  endtask

  initial begin
    tone(300.0, 2.0, 0);
    tone(1000.0, 2.0, 0);
    tone(1000.0, 6.0, 1);
    tone(2000.0, 4.0, 0);
    tone(3400.0, 2.0, 0);
    tone(1000.0, 0.5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
