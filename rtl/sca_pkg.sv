// Shared types and constants of the self-checking adder.
//
// Every data variable travels on two wires ("double rail"): the H wire
// carries the variable, the L wire its complement. A pair with H == L is a
// code violation and is what the checking logic looks for. The input gates
// of one adder produce six such wires, named after the variables they carry
// (X_1 = X_H, X_0 = X_L and so on). Each adder yields two groups of fault
// wires: the FIRST GROUP (A_1, A_2) must be HIGH while the adder rests with
// no fault injected, the SECOND GROUP (A_3, A_4, B_1..B_6) must be HIGH
// while a fault is injected, and both groups must be LOW after an addition.
package sca_pkg;

  // One double-rail variable: h is the variable, l its complement.
  typedef struct packed {
    logic h;
    logic l;
  } dual_rail_t;

  // The six gated input rails of one adder, X_1 X_0 Y_1 Y_0 C_1 C_0.
  typedef struct packed {
    logic x1;
    logic x0;
    logic y1;
    logic y0;
    logic c1;
    logic c0;
  } rails_t;

  // Fault wires per adder.
  localparam int unsigned N_FIRST_PER_ADDER = 2;  // A_1, A_2
  localparam int unsigned N_A_SECOND        = 2;  // A_3, A_4
  localparam int unsigned N_B               = 6;  // B_1 .. B_6

  // Width of the second group of one adder, with or without the B gates.
  function automatic int unsigned n_second(bit use_b);
    return use_b ? N_A_SECOND + N_B : N_A_SECOND;
  endfunction

endpackage
