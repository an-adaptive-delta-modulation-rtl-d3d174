// adaptation_logic: the step-size decision logic of the adaptive delta
// modulator.
//
// Combinational. The inputs are the four most recent bits latched as one
// word: A = b_n (newest), B = b_(n-1), C = b_(n-2), D = b_(n-3). Five
// sum-of-products outputs select the step-size change:
//   C1 = A'B'C' + ABC                          (three equal bits)
//   C2 = ABC'D' + A'B'CD                       (1100 / 0011)
//   C3 = B'C'D' + BCD                          (three equal older bits)
//   C4 = A'B'C'D' + A'B'CD + A'BCD' + AB'CD'
//   C5 = A'B'CD + AB'CD
// The product terms and their literal counts follow the reference logic
// circuit; the order A = newest is this design's choice. The outputs are
// not mutually exclusive: for ABCD = 0000, 1111 and 0011 two or three
// outputs are high at once, and the summing amplifier downstream adds
// their levels.
//
// Interface: abcd[3] = A ... abcd[0] = D; c[0] = C1 ... c[4] = C5.
// Timing: purely combinational, no clock.
module adaptation_logic (
  input  logic [3:0] abcd,
  output logic [4:0] c
);

  logic a, b, cc, d;
  assign {a, b, cc, d} = abcd;

  always_comb begin
    c[0] = (!a && !b && !cc) || (a && b && cc);
    c[1] = (a && b && !cc && !d) || (!a && !b && cc && d);
    c[2] = (!b && !cc && !d) || (b && cc && d);
    c[3] = (!a && !b && !cc && !d) || (!a && !b && cc && d)
        || (!a && b && cc && !d)   || (a && !b && cc && !d);
    c[4] = (!a && !b && cc && d) || (a && !b && cc && d);
  end

endmodule
