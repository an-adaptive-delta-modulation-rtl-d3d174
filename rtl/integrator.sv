// integrator: polarity multiplier and integrator of the delta modulator.
//
// Each sample adds +Delta (bit 1) or -Delta (bit 0) to the running
// estimate r, the digital counterpart of the op-amp RC integrator driven by
// the product of the bit and the step size. The sum saturates at the ends
// of the DATA_W range, as an op-amp stops at its rails; saturation and the
// reset value 0 are this design's choices.
//
// Interface: bit_in and delta are taken when sample_en is high.
// Timing: r changes one clock edge after the sample.
module integrator #(
  parameter int DATA_W = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample_en,
  input  logic                     bit_in,
  input  logic signed [DATA_W-1:0] delta,
  output logic signed [DATA_W-1:0] r
);

  localparam logic signed [DATA_W:0] MAXV = (DATA_W+1)'((1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [DATA_W:0] MINV = -MAXV - 1;

  logic signed [DATA_W:0] next;

  always_comb begin
    next = bit_in ? (DATA_W+1)'(r) + (DATA_W+1)'(delta)
                  : (DATA_W+1)'(r) - (DATA_W+1)'(delta);
    if (next > MAXV)      next = MAXV;
    else if (next < MINV) next = MINV;
  end

  always_ff @(posedge clk) begin
    if (rst)            r <= '0;
    else if (sample_en) r <= next[DATA_W-1:0];
  end

endmodule
