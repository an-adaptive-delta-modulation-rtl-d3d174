// step_size_register: adder and time-delay unit of the step-size loop.
//
// Holds the step size Delta and, when update is high, replaces it by
// Delta + K_n*Delta_o, which is |Delta_n| = |Delta_(n-1)| + K_n*Delta_o of
// the reference design; the register is the z^-1 delay that holds
// Delta_(n-1). The result is kept between DELTA_MIN and DELTA_MAX so the
// step size stays positive and bounded; these limits and the reset value
// DELTA_MIN are this design's choices.
//
// Interface: k_delta is K_n*Delta_o in signed LSB (1/64 V); delta is the
// unsigned-valued, always positive step size.
// Timing: delta changes on the clock edge where update is high.
module step_size_register #(
  parameter int DATA_W    = 12,
  parameter int DELTA_MIN = 32,
  parameter int DELTA_MAX = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     update,
  input  logic signed [DATA_W-1:0] k_delta,
  output logic signed [DATA_W-1:0] delta
);

  logic signed [DATA_W:0] next;

  always_comb begin
    next = (DATA_W+1)'(delta) + (DATA_W+1)'(k_delta);
    if (next > (DATA_W+1)'(DELTA_MAX))      next = (DATA_W+1)'(DELTA_MAX);
    else if (next < (DATA_W+1)'(DELTA_MIN)) next = (DATA_W+1)'(DELTA_MIN);
  end

  always_ff @(posedge clk) begin
    if (rst)         delta <= DATA_W'(DELTA_MIN);
    else if (update) delta <= next[DATA_W-1:0];
  end

endmodule
