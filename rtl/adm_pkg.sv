// adm_pkg: constants shared by the adaptive delta modulator.
//
// Voltages of the analog original are carried as two's complement
// fixed-point numbers with 1 LSB = 1/64 V, so the basic step increment
// Delta_o = 0.5 V is 32 LSB. The five step-size switches C1..C5 add
// +2, +1, 0, -1 and -2 times Delta_o (the levels printed beside the
// switches of the reference block diagram). The LSB weight and the word
// width are choices of this design; Delta_o and the switch levels follow
// the reference circuit.
package adm_pkg;

  // Number of step-size switches (C1..C5).
  localparam int unsigned NUM_SW = 5;

  // Multiple of Delta_o that switch i (0 = C1 ... 4 = C5) passes when on.
  function automatic int sw_weight(input int unsigned i);
    case (i)
      0:       return 2;
      1:       return 1;
      2:       return 0;
      3:       return -1;
      default: return -2;
    endcase
  endfunction

endpackage
