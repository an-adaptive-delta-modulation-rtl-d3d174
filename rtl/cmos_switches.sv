// cmos_switches: the five analog switches that gate the step-size change
// levels.
//
// Switch i connects its reference level sw_weight(i) * DELTA0 to its output
// when control C(i+1) is high and gives 0 otherwise. The levels are +2, +1,
// 0, -1 and -2 times Delta_o for C1..C5, and Delta_o = 0.5 V (DELTA0 = 32
// LSB of 1/64 V), as in the reference circuit; the number format is this
// design's choice.
//
// Because the levels are multiples of Delta_o, the low bits of every
// output are constant 0, and the third switch (level 0) always outputs 0;
// it is kept so that the five switches match the five controls.
//
// Interface: c[0] = C1 ... c[4] = C5; level[i] is the output of switch i.
// Timing: combinational.
module cmos_switches
  import adm_pkg::*;
#(
  parameter int DATA_W = 12,
  parameter int DELTA0 = 32
) (
  input  logic        [NUM_SW-1:0] c,
  output logic signed [DATA_W-1:0] level [NUM_SW]
);

  always_comb begin
    for (int unsigned i = 0; i < NUM_SW; i++) begin
      level[i] = c[i] ? DATA_W'(sw_weight(i) * DELTA0) : '0;
    end
  end

endmodule
