// vco: sample-clock generator with adjustable frequency and duty cycle.
//
// The digital counterpart of a square-wave oscillator whose frequency and
// duty cycle can be varied. A counter runs from 0 to period-1 on clk; the
// square wave sq is high for the first high_time counts of each period and
// low for the rest. sample_en is a one-clock pulse on each rising edge of
// sq and is the sampling clock of the delta modulator. Building the
// oscillator as a counter on a fast clock is this design's choice; the
// adjustable frequency and duty cycle follow the reference design.
//
// Interface: period (>= 2) and high_time (1 .. period-1) are read at the
// end of each period, so a change takes effect at the next period; values
// out of range are forced into range (period < 2 acts as 2, high_time 0
// as 1, high_time >= period as period-1).
// Timing: sample_en is high for one clock every period clocks, starting
// with the first clock after reset; sq rises together with it. Reset
// loads period and high_time at once.
module vco #(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] period,
  input  logic [CNT_W-1:0] high_time,
  output logic             sq,
  output logic             sample_en
);

  logic [CNT_W-1:0] count, cur_period, cur_high;
  logic [CNT_W-1:0] p_lim, h_lim;

  // Range limits, applied when a new period starts.
  always_comb begin
    p_lim = (period < CNT_W'(2)) ? CNT_W'(2) : period;
    if (high_time == '0)         h_lim = CNT_W'(1);
    else if (high_time >= p_lim) h_lim = p_lim - CNT_W'(1);
    else                         h_lim = high_time;
  end

  always_ff @(posedge clk) begin
    if (rst || count >= cur_period - CNT_W'(1)) begin
      count      <= '0;
      cur_period <= p_lim;
      cur_high   <= h_lim;
    end else begin
      count <= count + CNT_W'(1);
    end
  end

  assign sq        = (count < cur_high);
  assign sample_en = (count == '0) && !rst;

endmodule
