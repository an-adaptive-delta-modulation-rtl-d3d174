// tb_step_size_logic: a random bit stream with runs (to provoke slope
// overload words) and alternations (granular words), with random gaps
// between samples. The step size, the switch controls and K_n*Delta_o are
// compared with the reference model every cycle; the step size may change
// only on the sample after a word load, i.e. once per four samples.
module tb_step_size_logic;
  import adm_tb_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0, bit_in = 0;
  logic signed [11:0] delta, k_delta;
  logic [4:0] c;
  logic word_load;
  int checks = 0, failures = 0, changes = 0, nsamp = 0;
  int seen [5] = '{0, 0, 0, 0, 0};
  adm_ref m;

  step_size_logic #(.DATA_W(12), .DELTA0(32), .DELTA_MIN(32), .DELTA_MAX(256)) dut (
    .clk, .rst, .sample_en, .bit_in, .delta, .c, .k_delta, .word_load);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sample %0d", what, nsamp); end
  endtask

  initial begin
    bit prev = 0;
    int old_d;
    m = new(32, 256, 12);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 6000; i++) begin
      sample_en = ($urandom_range(0, 3) != 0);
      case ((i / 300) % 3)
        0: bit_in = ($urandom_range(0, 9) < 8) ? prev : !prev; // runs
        1: bit_in = ($urandom_range(0, 9) < 8) ? !prev : prev; // alternation
        default: bit_in = 1'($urandom);
      endcase
      #1;
      chk(c == (m.pipo_valid ? ref_ctrl(m.pipo) : 5'b0), "switch controls");
      chk(int'(k_delta) == (m.pipo_valid ? ref_kdelta(m.pipo) : 0), "k_delta");
      for (int s = 0; s < 5; s++) if (c[s]) seen[s]++;
      old_d = m.delta;
      @(posedge clk);
      if (sample_en) begin
        m.step(bit_in);
        if (m.delta != old_d) begin
          changes++;
          chk(nsamp % 4 == 0 && nsamp >= 4, "step change only on the sample after a load");
        end
        nsamp++;
        prev = bit_in;
      end
      #1;
      chk(int'(delta) == m.delta, "delta");
    end
    chk(changes > 0, "step size changed");
    for (int s = 0; s < 5; s++) chk(seen[s] > 0, "every switch used");
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
