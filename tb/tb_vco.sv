// tb_vco: the sample-clock generator is run through a list of period and
// high-time settings, including out-of-range ones. For every period the
// testbench measures the distance between sample_en pulses and the number
// of clocks sq is high, and compares them with the setting in force: a
// new setting applied during a period must take effect from the next one.
module tb_vco;
  logic clk = 0, rst = 1;
  logic [15:0] period = 5, high_time = 2;
  logic sq, sample_en;
  int checks = 0, failures = 0;

  vco #(.CNT_W(16)) dut (.clk, .rst, .period, .high_time, .sq, .sample_en);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Measures one period that starts at the current clock (sample_en high).
  task automatic measure(input int exp_p, input int exp_h);
    int len = 0, hi = 0;
    do begin
      if (sq) hi++;
      len++;
      @(posedge clk); #1;
    end while (!sample_en && len < 100000);
    chk(len == exp_p, $sformatf("period %0d expected %0d", len, exp_p));
    chk(hi == exp_h, $sformatf("high time %0d expected %0d", hi, exp_h));
  endtask

  initial begin
    int settings [8][2] = '{'{4, 2}, '{17, 8}, '{59, 30}, '{7, 1}, '{1, 1}, '{10, 0}, '{6, 9}, '{3, 2}};
    int exp [8][2]      = '{'{4, 2}, '{17, 8}, '{59, 30}, '{7, 1}, '{2, 1}, '{10, 1}, '{6, 5}, '{3, 2}};
    int cur_p = 5, cur_h = 2;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #1 chk(sample_en && sq, "first sample right after reset");
    measure(5, 2);
    for (int k = 0; k < 8; k++) begin
      // new setting applied at the start of a period: this period keeps
      // the old one, the next three use the new one
      period = 16'(settings[k][0]);
      high_time = 16'(settings[k][1]);
      measure(cur_p, cur_h);
      cur_p = exp[k][0]; cur_h = exp[k][1];
      repeat (3) measure(cur_p, cur_h);
    end
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
