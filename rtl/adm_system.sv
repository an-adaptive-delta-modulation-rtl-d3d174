// adm_system: adaptive delta-modulation link, modulator to demodulator.
//
// The modulator codes the sampled input x into one bit per sample, the
// bit crosses the channel and the demodulator rebuilds the signal. The
// input chan_flip inverts the transmitted bit, modelling a transmission
// error: after one, the demodulator's switches and step size no longer
// match the modulator's. Structure after the reference block diagrams;
// the channel-error input is this design's addition for test.
//
// The sample clock comes from the vco block: a square wave sample_clk of
// vco_period clocks with vco_high clocks high, whose rising edge is the
// one-clock pulse sample_en.
//
// Interface: x is taken on each sample_en; x_filt is the band-passed
// input the modulator codes. bit_tx is the channel bit. demod_r is the
// demodulator's integrator, which equals the modulator's estimate mod_r
// one sample earlier when the channel is clean; y is the band-passed
// demodulator output. The two step sizes and
// switch settings are brought out.
// Timing: one sample per vco_period clocks; y lags x by one sample plus the
// tracking delay of the delta-modulation loop.
module adm_system
  import adm_pkg::*;
#(
  parameter int DATA_W    = 12,
  parameter int DELTA0    = 32,
  parameter int DELTA_MIN = 32,
  parameter int DELTA_MAX = 256,
  parameter int CNT_W     = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [CNT_W-1:0]         vco_period,
  input  logic [CNT_W-1:0]         vco_high,
  output logic                     sample_clk,
  output logic                     sample_en,
  input  logic signed [DATA_W-1:0] x,
  input  logic                     chan_flip,
  output logic signed [DATA_W-1:0] x_filt,
  output logic                     bit_tx,
  output logic signed [DATA_W-1:0] mod_r,
  output logic signed [DATA_W-1:0] mod_delta,
  output logic        [NUM_SW-1:0] mod_c,
  output logic signed [DATA_W-1:0] mod_k_delta,
  output logic                     mod_word_load,
  output logic signed [DATA_W-1:0] demod_r,
  output logic signed [DATA_W-1:0] y,
  output logic signed [DATA_W-1:0] demod_delta,
  output logic        [NUM_SW-1:0] demod_c,
  output logic signed [DATA_W-1:0] demod_k_delta,
  output logic                     demod_word_load
);

  logic bit_mod, bit_valid;

  vco #(.CNT_W(CNT_W)) u_vco (
    .clk, .rst, .period(vco_period), .high_time(vco_high),
    .sq(sample_clk), .sample_en
  );

  adm_modulator #(
    .DATA_W(DATA_W), .DELTA0(DELTA0), .DELTA_MIN(DELTA_MIN), .DELTA_MAX(DELTA_MAX)
  ) u_mod (
    .clk, .rst, .sample_en, .x, .x_filt,
    .bit_out(bit_mod), .bit_valid,
    .r(mod_r), .delta(mod_delta), .c(mod_c), .k_delta(mod_k_delta),
    .word_load(mod_word_load)
  );

  assign bit_tx = bit_mod ^ chan_flip;

  adm_demodulator #(
    .DATA_W(DATA_W), .DELTA0(DELTA0), .DELTA_MIN(DELTA_MIN), .DELTA_MAX(DELTA_MAX)
  ) u_demod (
    .clk, .rst, .sample_en, .bit_in(bit_tx), .bit_valid,
    .r(demod_r), .y, .delta(demod_delta), .c(demod_c), .k_delta(demod_k_delta),
    .word_load(demod_word_load)
  );

endmodule
