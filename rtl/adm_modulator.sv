// adm_modulator: adaptive delta modulator with a logic-controlled step size.
//
// The input passes the 300-3400 Hz band-pass filter. A feedback loop
// follows: the quantiser compares the filtered sample x_filt with the
// estimate r and emits one bit per sample; the step size logic adapts the
// step size Delta from the last bits; the integrator moves r up or down by
// Delta. The loop structure is that of the reference block diagram. The
// loop takes the bit at the instant it is sampled (bit_now), so r moves
// one step per sample with no added loop delay; the sampled, held bit
// (bit_out) is what goes to the channel. Those timing details are this
// design's choices.
//
// Interface: x is read when sample_en is high; x_filt is the band-passed
// input that the loop codes. bit_out/bit_valid form the
// transmitted stream. r, delta, c and k_delta are brought out for
// observation.
// Timing: one bit per sample_en; bit_out and r change on that edge. The
// filter adds two samples of delay between x and x_filt.
module adm_modulator
  import adm_pkg::*;
#(
  parameter int DATA_W    = 12,
  parameter int DELTA0    = 32,
  parameter int DELTA_MIN = 32,
  parameter int DELTA_MAX = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample_en,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] x_filt,
  output logic                     bit_out,
  output logic                     bit_valid,
  output logic signed [DATA_W-1:0] r,
  output logic signed [DATA_W-1:0] delta,
  output logic        [NUM_SW-1:0] c,
  output logic signed [DATA_W-1:0] k_delta,
  output logic                     word_load
);

  logic bit_now;

  butterworth_bandpass #(.DATA_W(DATA_W)) u_bpf (
    .clk, .rst, .sample_en, .x, .y(x_filt)
  );

  quantiser_sampler #(.DATA_W(DATA_W)) u_quant (
    .clk, .rst, .sample_en, .x(x_filt), .r, .bit_now, .bit_out, .bit_valid
  );

  step_size_logic #(
    .DATA_W(DATA_W), .DELTA0(DELTA0), .DELTA_MIN(DELTA_MIN), .DELTA_MAX(DELTA_MAX)
  ) u_step (
    .clk, .rst, .sample_en, .bit_in(bit_now), .delta, .c, .k_delta, .word_load
  );

  integrator #(.DATA_W(DATA_W)) u_int (
    .clk, .rst, .sample_en, .bit_in(bit_now), .delta, .r
  );

endmodule
