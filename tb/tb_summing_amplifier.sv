// tb_summing_amplifier: sums of the real switch levels and of random
// large values; the output must be the integer sum clipped to 12 bits.
module tb_summing_amplifier;
  import adm_tb_pkg::*;
  logic signed [11:0] level [5];
  logic signed [11:0] k_delta;
  int checks = 0, failures = 0, clipped = 0;

  summing_amplifier #(.DATA_W(12)) dut (.level, .k_delta);

  task automatic apply_and_check();
    int s = 0;
    for (int i = 0; i < 5; i++) s += int'(level[i]);
    #1;
    checks++;
    if (s > 2047 || s < -2048) clipped++;
    if (int'(k_delta) != clamp(s, -2048, 2047)) begin
      failures++;
      $display("FAIL sum=%0d got=%0d", s, k_delta);
    end
  endtask

  initial begin
    for (int m = 0; m < 32; m++) begin
      for (int i = 0; i < 5; i++) level[i] = m[i] ? 12'(LEVEL[i]) : '0;
      apply_and_check();
    end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 5; i++) level[i] = 12'($urandom);
      apply_and_check();
    end
    checks++;
    if (clipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
