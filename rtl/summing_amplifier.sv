// summing_amplifier: unity-gain sum of the five switch outputs.
//
// Adds the five switched levels into K_n * Delta_o, the change to apply to
// the step size. The sum is formed three bits wider than the inputs and
// then clipped to the DATA_W range, as an amplifier output clips at its
// rails; the clipping is this design's choice and is never reached with
// the default levels.
//
// Interface: level[0..4] from the switches, k_delta = their sum.
// Timing: combinational.
module summing_amplifier
  import adm_pkg::*;
#(
  parameter int DATA_W = 12
) (
  input  logic signed [DATA_W-1:0] level [NUM_SW],
  output logic signed [DATA_W-1:0] k_delta
);

  localparam logic signed [DATA_W+2:0] MAXV = (DATA_W+3)'((1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [DATA_W+2:0] MINV = -MAXV - 1;

  logic signed [DATA_W+2:0] sum;

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < NUM_SW; i++) begin
      sum = sum + (DATA_W+3)'(level[i]);
    end
    if (sum > MAXV)      k_delta = MAXV[DATA_W-1:0];
    else if (sum < MINV) k_delta = MINV[DATA_W-1:0];
    else                 k_delta = sum[DATA_W-1:0];
  end

endmodule
