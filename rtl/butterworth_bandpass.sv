// butterworth_bandpass: 300-3400 Hz band-pass filter of the delta
// modulation link, as a sampled-data filter.
//
// A second-order Butterworth low-pass section (3400 Hz) is cascaded with a
// second-order Butterworth high-pass section (300 Hz), both running at the
// sample rate. The pass band, the Butterworth type and the low-pass /
// high-pass cascade follow the reference design; realising it as a digital
// filter at the 17 kHz sample rate is this design's choice. The
// coefficients come from the bilinear transform: with
// K = tan(pi * fc / fs) and N = 1 / (1 + sqrt(2) K + K^2),
//   low-pass:  b = (K^2 N, 2 K^2 N, K^2 N)
//   high-pass: b = (N, -2 N, N)
//   both:      a1 = 2 (K^2 - 1) N,  a2 = (1 - sqrt(2) K + K^2) N
// each multiplied by 2**14 and rounded; the defaults are for fs = 17 kHz.
// Inside, samples carry EXT extra fraction bits to keep rounding noise
// below the input LSB.
//
// Interface: x is taken when sample_en is high; y is the filtered signal.
// Timing: two samples of latency (one per section).
module butterworth_bandpass #(
  parameter int DATA_W = 12,
  parameter int EXT    = 4,
  parameter int LP_B0  = 3384,
  parameter int LP_B1  = 6769,
  parameter int LP_B2  = 3384,
  parameter int LP_A1  = -6054,
  parameter int LP_A2  = 3208,
  parameter int HP_B0  = 15148,
  parameter int HP_B1  = -30297,
  parameter int HP_B2  = 15148,
  parameter int HP_A1  = -30204,
  parameter int HP_A2  = 14006
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample_en,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] y
);

  localparam int W = DATA_W + EXT + 2;
  localparam logic signed [W-1:0] MAXV = W'((1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [W-1:0] MINV = -MAXV - 1;

  logic signed [W-1:0] xs, lp_y, hp_y, yr;

  assign xs = W'(x) <<< EXT;

  biquad #(.W(W), .CF(14), .B0(LP_B0), .B1(LP_B1), .B2(LP_B2), .A1(LP_A1), .A2(LP_A2))
    u_lowpass (.clk, .rst, .sample_en, .x(xs), .y(lp_y));

  biquad #(.W(W), .CF(14), .B0(HP_B0), .B1(HP_B1), .B2(HP_B2), .A1(HP_A1), .A2(HP_A2))
    u_highpass (.clk, .rst, .sample_en, .x(lp_y), .y(hp_y));

  always_comb begin
    yr = (hp_y + (W'(1) <<< (EXT - 1))) >>> EXT;
    if (yr > MAXV)      y = MAXV[DATA_W-1:0];
    else if (yr < MINV) y = MINV[DATA_W-1:0];
    else                y = yr[DATA_W-1:0];
  end

endmodule
