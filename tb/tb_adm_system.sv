// tb_adm_system: end-to-end run of the adaptive delta-modulation link at
// its default parameters. The built-in sample-clock generator first
// samples every fourth clock, and every seventh clock in phase 2 (the
// sample clock of a 17 kHz system driven from a faster clock).
//   Phase 1: idle input (0 V), then a 1 kHz sine whose amplitude rises
//            from 0.5 V to 6 V, both through the input band-pass filter.
//            The transmitted bits, the estimate and the
//            step size are compared with the reference model, and the
//            demodulator integrator must equal the modulator estimate one
//            sample earlier, and the filtered output must have about the
//            input's power. Tracking must beat a linear delta modulator
//            with the fixed step Delta_o run on the same input.
//   Phase 2: the sample clock slows down and one channel bit is inverted; the demodulator must then
//            differ from the modulator (a transmission error).
// Every mechanism of the design is counted and must occur: each switch
// C1..C5, a word that closes several switches, the idle 1010 pattern,
// slope-overload words, the step size at both limits and at least one
// step change, the transmission error and both sample-clock settings.
module tb_adm_system;
  import adm_tb_pkg::*;
  logic clk = 0, rst = 1, chan_flip = 0;
  logic sample_en, sample_clk;
  logic [15:0] vco_period = 4, vco_high = 2;
  int n_rate [2] = '{0, 0};
  logic signed [11:0] x = 0;
  logic bit_tx, mod_word_load;
  logic signed [11:0] x_filt, mod_r, mod_delta, mod_k_delta, demod_r, y, demod_delta, demod_k_delta;
  logic demod_word_load;
  logic [4:0] mod_c, demod_c;

  int checks = 0, failures = 0;
  int n_sw [5] = '{0, 0, 0, 0, 0};
  int n_multi = 0, n_idle = 0, n_overload = 0, n_max = 0, n_min = 0, n_change = 0, n_mismatch = 0;
  real err_adm = 0.0, err_ldm = 0.0;
  real pow_in = 0.0, pow_out = 0.0;
  adm_ref m;


  adm_system dut (
    .clk, .rst, .vco_period, .vco_high, .sample_clk, .sample_en, .x, .chan_flip, .x_filt, .bit_tx,
    .mod_r, .mod_delta, .mod_c, .mod_k_delta, .mod_word_load,
    .demod_r, .y, .demod_delta, .demod_c, .demod_k_delta, .demod_word_load);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what, input int n);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s sample %0d", what, n); end
  endtask

  // One sample: drive x, wait for the clock edge at which the generator's
  // sample_en is high, and check the distance from the previous sample.
  int last_edge = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic sample(input int xv, input bit flip);
    x = 12'(xv);
    chan_flip = flip;
    while (!sample_en) @(negedge clk);
    @(posedge clk);
    #1 chan_flip = 0;
    if (last_edge != 0) begin
      if (cycle - last_edge == 4) n_rate[0]++;
      else if (cycle - last_edge == 7) n_rate[1]++;
      else chk(0, "sample spacing", cycle - last_edge);
    end
    last_edge = cycle;
  endtask

  initial begin
    int prev_r, prev_d, ldm_r, xv, d_before;
    bit b;
    real amp;
    m = new(32, 256, 12);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    prev_r = 0; prev_d = 32; ldm_r = 0;

    // Phase 1: clean channel
    for (int n = 0; n < 6000; n++) begin
      if (n < 400) xv = 0;
      else begin
        amp = 64.0 * (0.5 + 5.5 * (n - 400) / 5600.0);
        xv = $rtoi(amp * $sin(2.0 * 3.14159265 * 1000.0 * n / 17000.0));
      end
      b = (int'(x_filt) - m.r >= 0);
      d_before = m.delta;
      sample(xv, 0);
      m.step(b);
      chk(bit_tx == b, "transmitted bit", n);
      chk(int'(mod_r) == m.r, "modulator estimate", n);
      chk(int'(mod_delta) == m.delta, "modulator step size", n);
      if (n > 0) begin
        chk(int'(demod_r) == prev_r, "demodulator integrator = estimate one sample earlier", n);
        chk(int'(demod_delta) == prev_d, "demodulator step size = modulator one sample earlier", n);
      end
      prev_r = m.r; prev_d = m.delta;
      if (m.delta != d_before) n_change++;
      if (m.delta == 256) n_max++;
      if (m.delta == 32 && n > 400) n_min++;
      if (m.pipo_valid && m.count == 0) begin   // a word was just latched
        for (int s = 0; s < 5; s++) if (mod_c[s]) n_sw[s]++;
        if ($countones(mod_c) > 1) n_multi++;
        if (m.pipo == 4'b1010 || m.pipo == 4'b0101) n_idle++;
        if (m.pipo == 4'b1111 || m.pipo == 4'b0000) n_overload++;
        chk(mod_c == ref_ctrl(m.pipo), "switches", n);
      end
      // linear DM with fixed step Delta_o on the same samples
      ldm_r += (int'(x_filt) - ldm_r >= 0) ? 32 : -32;
      if (n > 2000) begin
        err_adm += real'((int'(x_filt) - int'(mod_r)) * (int'(x_filt) - int'(mod_r)));
        err_ldm += real'((int'(x_filt) - ldm_r) * (int'(x_filt) - ldm_r));
      end
      if (n > 5000) begin
        pow_in  += real'(int'(x_filt) * int'(x_filt));
        pow_out += real'(int'(y) * int'(y));
      end
    end
    $display("rms error ADM %0.1f LSB, LDM %0.1f LSB", $sqrt(err_adm / 4000.0), $sqrt(err_ldm / 4000.0));
    chk(err_adm < err_ldm, "adaptive step beats fixed step on a large sine", 0);
    $display("rms filtered input %0.1f, rms demodulator output %0.1f", $sqrt(pow_in / 999.0), $sqrt(pow_out / 999.0));
    chk(pow_out > pow_in * 0.64 && pow_out < pow_in * 1.96, "demodulator output power within 0.8..1.4 of input", 0);

    // Phase 2: slower sample clock (7 clocks, 3 high), one inverted channel bit
    vco_period = 7;
    vco_high = 3;
    for (int n = 0; n < 400; n++) begin
      xv = $rtoi(320.0 * $sin(2.0 * 3.14159265 * 1000.0 * n / 17000.0));
      b = (int'(x_filt) - m.r >= 0);
      sample(xv, n == 10);
      m.step(b);
      chk(int'(mod_r) == m.r, "modulator unaffected by channel error", n);
      if (n > 10 && (int'(demod_r) != prev_r || int'(demod_delta) != prev_d)) n_mismatch++;
      prev_r = m.r; prev_d = m.delta;
    end

    $display("switch words C1..C5: %0d %0d %0d %0d %0d, multi %0d, idle 1010 %0d, overload %0d",
             n_sw[0], n_sw[1], n_sw[2], n_sw[3], n_sw[4], n_multi, n_idle, n_overload);
    $display("step at max %0d, at min %0d, changes %0d, mismatched samples after error %0d",
             n_max, n_min, n_change, n_mismatch);
    for (int s = 0; s < 5; s++) chk(n_sw[s] > 0, "switch used", s);
    chk(n_multi > 0, "several switches at once", 0);
    chk(n_idle > 0, "idle alternating pattern", 0);
    chk(n_overload > 0, "slope overload words", 0);
    chk(n_max > 0, "step size at maximum", 0);
    chk(n_min > 0, "step size at minimum", 0);
    chk(n_change > 0, "step size changes", 0);
    chk(n_mismatch > 0, "transmission error shows at the demodulator", 0);
    $display("samples 4 clocks apart %0d, 7 clocks apart %0d", n_rate[0], n_rate[1]);
    chk(n_rate[0] > 5000 && n_rate[1] > 300, "sample-clock frequency change", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
