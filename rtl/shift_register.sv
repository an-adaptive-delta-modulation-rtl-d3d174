// shift_register: bit history of the adaptive delta modulator.
//
// A serial-in parallel-out (SIPO) register takes one bit per sample clock;
// the newest bit enters at the top, so sipo[WORD_LEN-1] = b_n. A binary
// counter divides the sample clock by WORD_LEN and clocks a parallel-in
// parallel-out (PIPO) register, which latches the SIPO word once every
// WORD_LEN samples so that the adaptation logic sees a stable word. This
// SIPO + counter + PIPO structure follows the reference circuit; loading
// the PIPO on the last sample of each word (with that sample included) and
// the synchronous reset are this design's choices.
//
// Interface: bit_in is shifted when sample_en is high. word_load is high
// (combinationally) in the cycle whose clock edge loads the PIPO;
// pipo_valid rises once the first full word has been latched.
// Timing: pipo changes one clock edge after word_load, i.e. every WORD_LEN
// samples.
module shift_register #(
  parameter int unsigned WORD_LEN = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_en,
  input  logic                bit_in,
  output logic [WORD_LEN-1:0] sipo,
  output logic [WORD_LEN-1:0] pipo,
  output logic                word_load,
  output logic                pipo_valid
);

  localparam int unsigned CW = (WORD_LEN > 2) ? $clog2(WORD_LEN) : 1;

  logic [CW-1:0]       count;
  logic [WORD_LEN-1:0] sipo_next;

  assign sipo_next = {bit_in, sipo[WORD_LEN-1:1]};
  assign word_load = sample_en && (count == CW'(WORD_LEN - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      sipo       <= '0;
      pipo       <= '0;
      count      <= '0;
      pipo_valid <= 1'b0;
    end else if (sample_en) begin
      sipo  <= sipo_next;
      count <= (count == CW'(WORD_LEN - 1)) ? '0 : count + 1'b1;
      if (word_load) begin
        pipo       <= sipo_next;
        pipo_valid <= 1'b1;
      end
    end
  end

endmodule
