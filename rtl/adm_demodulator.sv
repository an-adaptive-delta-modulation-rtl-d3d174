// adm_demodulator: adaptive delta demodulator.
//
// Rebuilds the estimate from the received bit stream with a copy of the
// modulator's step size logic and integrator, so that with an error-free
// channel its step size and output follow the modulator's exactly, one
// sample later. A bit error makes the two step sizes differ until the
// step size runs into a limit on both sides. The integrator output r is
// smoothed by the 300-3400 Hz band-pass filter into y. The composition
// (adaptation logic, integrator, band-pass filter) follows the reference
// design.
//
// Interface: bit_in is taken when sample_en and bit_valid are both high.
// r is the integrator output, y the filtered, reconstructed signal.
// Timing: r changes on the edge of each accepted bit; y follows r through
// the two-sample delay of the filter.
module adm_demodulator
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
  input  logic                     bit_in,
  input  logic                     bit_valid,
  output logic signed [DATA_W-1:0] r,
  output logic signed [DATA_W-1:0] y,
  output logic signed [DATA_W-1:0] delta,
  output logic        [NUM_SW-1:0] c,
  output logic signed [DATA_W-1:0] k_delta,
  output logic                     word_load
);

  logic take;
  assign take = sample_en && bit_valid;

  step_size_logic #(
    .DATA_W(DATA_W), .DELTA0(DELTA0), .DELTA_MIN(DELTA_MIN), .DELTA_MAX(DELTA_MAX)
  ) u_step (
    .clk, .rst, .sample_en(take), .bit_in, .delta, .c, .k_delta, .word_load
  );

  integrator #(.DATA_W(DATA_W)) u_int (
    .clk, .rst, .sample_en(take), .bit_in, .delta, .r
  );

  butterworth_bandpass #(.DATA_W(DATA_W)) u_bpf (
    .clk, .rst, .sample_en(take), .x(r), .y
  );

endmodule
