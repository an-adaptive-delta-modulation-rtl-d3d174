// quantiser_sampler: input adder, one-bit quantiser and sampler.
//
// Forms the error e = x - r, quantises it to one bit (1 when e >= 0, i.e.
// +Delta; 0 when e < 0, i.e. -Delta) and samples that bit into a J-K
// flip-flop that holds it for one sample period, as the reference circuit
// does. The J-K flip-flop is driven with J = (e >= 0), K = (e < 0); the
// sign convention and reset value are this design's choices.
//
// Interface: bit_now is the bit being sampled (combinational from x and r)
// and feeds the modulator's own loop; bit_out is the held bit sent to the
// channel; bit_valid rises with the first sample.
// Timing: bit_out changes on the clock edge where sample_en is high.
module quantiser_sampler #(
  parameter int DATA_W = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample_en,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] r,
  output logic                     bit_now,
  output logic                     bit_out,
  output logic                     bit_valid
);

  logic signed [DATA_W:0] e;
  logic j, k;

  assign e       = (DATA_W+1)'(x) - (DATA_W+1)'(r);
  assign bit_now = !e[DATA_W];
  assign j       = bit_now;
  assign k       = !bit_now;

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else if (sample_en) begin
      bit_valid <= 1'b1;
      case ({j, k})
        2'b10:   bit_out <= 1'b1;
        2'b01:   bit_out <= 1'b0;
        2'b11:   bit_out <= !bit_out;
        default: bit_out <= bit_out;
      endcase
    end
  end

endmodule
