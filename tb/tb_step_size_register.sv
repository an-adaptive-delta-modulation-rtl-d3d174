// tb_step_size_register: random changes of +-64, +-32 and 0 LSB with
// random update strobes; the held step size must follow
// Delta_n = Delta_(n-1) + K_n*Delta_o kept within [32, 256], and both
// limits must be reached.
module tb_step_size_register;
  import adm_tb_pkg::*;
  logic clk = 0, rst = 1, update = 0;
  logic signed [11:0] k_delta = 0, delta;
  int checks = 0, failures = 0, exp_d = 32, hit_min = 0, hit_max = 0;

  step_size_register #(.DATA_W(12), .DELTA_MIN(32), .DELTA_MAX(256)) dut (.clk, .rst, .update, .k_delta, .delta);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (delta != 32) failures++;
    for (int i = 0; i < 3000; i++) begin
      update = 1'($urandom);
      // bias the walk so that it spends time near both limits
      k_delta = 12'(LEVEL[(i / 200) % 2 == 0 ? $urandom_range(0, 3) : $urandom_range(1, 4)]);
      @(posedge clk);
      if (update) exp_d = clamp(exp_d + int'(k_delta), 32, 256);
      #1;
      checks++;
      if (int'(delta) != exp_d) begin failures++; $display("FAIL i=%0d delta=%0d exp=%0d", i, delta, exp_d); end
      if (exp_d == 32) hit_min++;
      if (exp_d == 256) hit_max++;
    end
    checks += 2;
    if (hit_min == 0) failures++;
    if (hit_max == 0) failures++;
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
