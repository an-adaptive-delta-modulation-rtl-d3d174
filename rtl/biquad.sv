// biquad: second-order IIR section, direct form I, fixed-point
// coefficients.
//
// y[n] = (B0 x[n] + B1 x[n-1] + B2 x[n-2] - A1 y[n-1] - A2 y[n-2]) / 2**CF
// with the coefficients given as integers scaled by 2**CF, rounded to the
// nearest integer and saturated to W bits. It is the building block of the
// band-pass filter; the structure and number format are this design's
// choices.
//
// Interface: x is taken when sample_en is high; y is registered.
// Timing: y holds the result for the sample taken on the previous
// sample_en edge (one sample of latency).
module biquad #(
  parameter int W  = 16,
  parameter int CF = 14,
  parameter int B0 = 16384,
  parameter int B1 = 0,
  parameter int B2 = 0,
  parameter int A1 = 0,
  parameter int A2 = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int AW = W + 20;
  localparam logic signed [AW-1:0] MAXV = AW'((64'sd1 <<< (W - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -MAXV - 1;

  logic signed [W-1:0]  x1, x2, y2;
  logic signed [AW-1:0] acc, q;
  logic signed [W-1:0]  ynew;

  always_comb begin
    acc = AW'(B0) * AW'(x) + AW'(B1) * AW'(x1) + AW'(B2) * AW'(x2)
        - AW'(A1) * AW'(y) - AW'(A2) * AW'(y2);
    q = (acc + (AW'(1) <<< (CF - 1))) >>> CF;
    if (q > MAXV)      ynew = MAXV[W-1:0];
    else if (q < MINV) ynew = MINV[W-1:0];
    else               ynew = q[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x1 <= '0; x2 <= '0; y <= '0; y2 <= '0;
    end else if (sample_en) begin
      x1 <= x;  x2 <= x1;
      y2 <= y;  y  <= ynew;
    end
  end

endmodule
