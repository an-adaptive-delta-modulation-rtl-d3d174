// adm_tb_pkg: reference model shared by the testbenches.
//
// The switch controls are modelled by minterm tables rather than by the
// sum-of-products form used in the RTL: bit m of CTRL_MASK[i] is set when
// output C(i+1) is high for the 4-bit word ABCD = m (A = newest bit).
//   C1: 0000 0001 1110 1111      C2: 0011 1100
//   C3: 0000 0111 1000 1111      C4: 0000 0011 0110 1010
//   C5: 0011 1011
// The step-size change of a word is the sum of the levels of its active
// switches, +64, +32, 0, -32, -64 LSB (Delta_o = 32 LSB = 0.5 V).
package adm_tb_pkg;

  localparam logic [15:0] CTRL_MASK [5] = '{16'hC003, 16'h1008, 16'h8181, 16'h0449, 16'h0808};
  localparam int          LEVEL     [5] = '{64, 32, 0, -32, -64};

  function automatic logic [4:0] ref_ctrl(input logic [3:0] abcd);
    logic [4:0] c;
    for (int i = 0; i < 5; i++) c[i] = CTRL_MASK[i][abcd];
    return c;
  endfunction

  function automatic int ref_kdelta(input logic [3:0] abcd);
    int s = 0;
    for (int i = 0; i < 5; i++) if (CTRL_MASK[i][abcd]) s += LEVEL[i];
    return s;
  endfunction

  function automatic int clamp(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Reference model of one step-size path plus integrator, advanced one
  // accepted sample at a time.
  class adm_ref;
    int delta, r, count, dmin, dmax, lo, hi;
    logic [3:0] sipo, pipo;
    bit pipo_valid, pending;
    function new(int dmin_i = 32, int dmax_i = 256, int data_w = 12);
      dmin = dmin_i; dmax = dmax_i;
      hi = (1 << (data_w - 1)) - 1; lo = -hi - 1;
      reset();
    endfunction
    function void reset();
      delta = dmin; r = 0; count = 0; sipo = 0; pipo = 0;
      pipo_valid = 0; pending = 0;
    endfunction
    // Advance by one sample with bit b; the integrator uses the step size
    // held before this sample.
    function void step(bit b);
      int d_old = delta;
      if (pending) delta = clamp(delta + ref_kdelta(pipo), dmin, dmax);
      pending = 0;
      sipo = {b, sipo[3:1]};
      if (count == 3) begin pipo = sipo; pipo_valid = 1; pending = 1; count = 0; end
      else count++;
      r = clamp(b ? r + d_old : r - d_old, lo, hi);
    endfunction
  endclass

endpackage
