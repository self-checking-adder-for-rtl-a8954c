// First level of the self-checking full adder: the one-from-eight code.
//
// The adder has eight active states i = 4*C + 2*Y + X. Gate S_i looks at one
// rail of each variable, X_1 or X_0 according to bit 0 of i, Y_1 or Y_0
// according to bit 1 and C_1 or C_0 according to bit 2, and goes LOW only
// when all three are HIGH. With faultless double-rail inputs exactly one S_i
// is LOW (the code "one LOW out of eight"); with all rails LOW (passive
// interval) every S_i is HIGH; with all rails HIGH (fault injection) every
// S_i is LOW.
//
// Interface: rails (six gated rails), s (S_7..S_0). Purely combinational.
//
// The code and the three configurations follow the original design (its
// table of faultless states); the three-input NAND is the simplest gate that
// produces them.
module sca_first_level
  import sca_pkg::*;
(
  input  rails_t     rails,
  output logic [7:0] s
);

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      s[i] = ~((i[0] ? rails.x1 : rails.x0) &
               (i[1] ? rails.y1 : rails.y0) &
               (i[2] ? rails.c1 : rails.c0));
    end
  end

endmodule
