// tb_adaptation_logic: exhaustive check of the step-size decision logic.
// All 16 input words are applied and the five outputs compared with the
// minterm tables of adm_tb_pkg; words that turn on more than one switch
// are counted and must be exactly 0000, 0011 and 1111.
module tb_adaptation_logic;
  import adm_tb_pkg::*;
  logic [3:0] abcd;
  logic [4:0] c;
  int checks = 0, failures = 0, multi = 0;

  adaptation_logic dut (.abcd, .c);

  initial begin
    for (int m = 0; m < 16; m++) begin
      abcd = 4'(m);
      #1;
      checks++;
      if (c !== ref_ctrl(abcd)) begin
        failures++;
        $display("FAIL abcd=%b c=%b exp=%b", abcd, c, ref_ctrl(abcd));
      end
      if ($countones(c) > 1) begin
        multi++;
        checks++;
        if (!(m == 0 || m == 3 || m == 15)) failures++;
      end
    end
    checks++;
    if (multi != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
