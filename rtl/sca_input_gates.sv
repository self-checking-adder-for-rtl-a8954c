// Input gates of the self-checking full adder.
//
// Each of the six input wires X_H, X_L, Y_H, Y_L, C_H, C_L passes two gates.
// The primed gate (X'_1, X'_0, ...) lets the wire through only while the add
// clock T is HIGH, so that during the passive interval every rail is LOW.
// The following gate (X_1, X_0, ...) forces its rail HIGH while the fault-
// injection pulse T* is HIGH, so that a fault injection drives every rail of
// the adder to 1. With T = 1 and T* = 0 the rails equal the inputs:
// X_1 = X_H, X_0 = X_L, and likewise for Y and C.
//
// Interface: t (add clock), t_star (fault injection), x/y/c (double-rail
// operands and carry-in, h = variable, l = complement), rails (the six gated
// wires). Purely combinational.
//
// The three rail configurations (all LOW when T = T* = 0, all HIGH when
// T* = 1, equal to the inputs when T = 1, T* = 0) are those of the original
// design; the AND/OR realisation is the simplest logic that meets them.
module sca_input_gates
  import sca_pkg::*;
(
  input  logic       t,
  input  logic       t_star,
  input  dual_rail_t x,
  input  dual_rail_t y,
  input  dual_rail_t c,
  output rails_t     rails
);

  // Primed gates X'_1 X'_0 Y'_1 Y'_0 C'_1 C'_0 (bit 5 down to bit 0).
  logic [5:0] primed;
  // Rail gates X_1 X_0 Y_1 Y_0 C_1 C_0 (bit 5 down to bit 0).
  logic [5:0] injected;

  always_comb begin
    primed   = {6{t}} & {x.h, x.l, y.h, y.l, c.h, c.l};
    injected = primed | {6{t_star}};
    rails    = rails_t'(injected);
  end

endmodule
