// tb_cmos_switches: all 32 control patterns; each switch output must be
// its level (+64, +32, 0, -32, -64 LSB) when on and 0 when off.
module tb_cmos_switches;
  import adm_tb_pkg::*;
  logic [4:0] c;
  logic signed [11:0] level [5];
  int checks = 0, failures = 0;

  cmos_switches #(.DATA_W(12), .DELTA0(32)) dut (.c, .level);

  initial begin
    for (int m = 0; m < 32; m++) begin
      c = 5'(m);
      #1;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (int'(level[i]) != (c[i] ? LEVEL[i] : 0)) begin
          failures++;
          $display("FAIL c=%b i=%0d level=%0d", c, i, level[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
