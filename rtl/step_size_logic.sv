// step_size_logic: turns the delta-modulation bit stream into the step size.
//
// The same unit sits in the modulator and in the demodulator. Each sample
// bit enters the 4-bit shift register; every fourth sample the PIPO
// register latches the last four bits for the adaptation logic, whose
// outputs C1..C5 close the switches. The summing amplifier adds the switch
// levels into K_n*Delta_o and, on the sample after the word was latched,
// the step-size register applies |Delta_n| = |Delta_(n-1)| + K_n*Delta_o.
// The chain of blocks follows the reference block diagram; the moment of
// the update and the step limits are this design's choices. Until the
// first word is latched all switches stay open.
//
// Interface: bit_in is taken when sample_en is high. delta is the step
// size used by the integrator; c, k_delta and word_load are brought out
// for observation.
// Timing: delta changes once per four samples, on the sample after
// word_load.
module step_size_logic
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
  output logic signed [DATA_W-1:0] delta,
  output logic        [NUM_SW-1:0] c,
  output logic signed [DATA_W-1:0] k_delta,
  output logic                     word_load
);

  localparam int unsigned WORD_LEN = 4;

  logic [WORD_LEN-1:0]       sipo, pipo;
  logic                      pipo_valid;
  logic [NUM_SW-1:0]         c_raw;
  logic signed [DATA_W-1:0]  level [NUM_SW];
  logic                      pending;

  shift_register #(.WORD_LEN(WORD_LEN)) u_shift (
    .clk, .rst, .sample_en, .bit_in,
    .sipo, .pipo, .word_load, .pipo_valid
  );

  adaptation_logic u_logic (.abcd(pipo), .c(c_raw));

  assign c = pipo_valid ? c_raw : '0;

  cmos_switches #(.DATA_W(DATA_W), .DELTA0(DELTA0)) u_switches (.c, .level);

  summing_amplifier #(.DATA_W(DATA_W)) u_sum (.level, .k_delta);

  // One sample after the PIPO load, the new word is applied once.
  always_ff @(posedge clk) begin
    if (rst)            pending <= 1'b0;
    else if (sample_en) pending <= word_load;
  end

  step_size_register #(
    .DATA_W(DATA_W), .DELTA_MIN(DELTA_MIN), .DELTA_MAX(DELTA_MAX)
  ) u_step (
    .clk, .rst, .update(sample_en && pending), .k_delta, .delta
  );

endmodule
