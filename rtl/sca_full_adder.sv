// Self-checking full adder.
//
// A two-level gate network computes X + Y + C = 2G + Z on double-rail
// signals and derives ten fault signals from its own internal codes:
//   input gates    : gate the six input rails with T and force them HIGH
//                    with T* (sca_input_gates)
//   first level    : one-from-eight code S_0..S_7 (sca_first_level)
//   second level   : two-from-four code Z_1 Z_0 G_1 G_0 (sca_second_level)
//   fault gates    : A_1..A_4 and B_1..B_6 (sca_fault_gates)
//
// Three checks are made with it from outside (see fault_signalizer):
//   T = 0, T* = 0 : the FIRST GROUP {A_2, A_1} must be all HIGH
//   T* = 1        : the SECOND GROUP {B_6..B_1, A_4, A_3} must be all HIGH
//   T = 1, T* = 0 : every fault wire must be LOW once the sum has settled
// Together they expose any single stuck-at-0 or stuck-at-1 gate and also a
// non-complementary input pair, and make most multiple faults visible.
//
// Interface: t, t_star, x, y, c (double rail, h = variable, l = complement)
// in; z (sum), g (carry-out), first and second fault groups out. Purely
// combinational: outputs settle one gate chain after any input change.
// The structure follows the original design; the gate functions are derived
// from its tables of signal configurations.
module sca_full_adder
  import sca_pkg::*;
#(
  parameter bit USE_B_GATES = 1'b1,
  localparam int unsigned NSEC = n_second(USE_B_GATES)
) (
  input  logic            t,
  input  logic            t_star,
  input  dual_rail_t      x,
  input  dual_rail_t      y,
  input  dual_rail_t      c,
  output dual_rail_t      z,
  output dual_rail_t      g,
  output logic [N_FIRST_PER_ADDER-1:0] first,
  output logic [NSEC-1:0] second
);

  rails_t     rails;
  logic [7:0] s;

  sca_input_gates u_in (
    .t      (t),
    .t_star (t_star),
    .x      (x),
    .y      (y),
    .c      (c),
    .rails  (rails)
  );

  sca_first_level u_first (
    .rails (rails),
    .s     (s)
  );

  sca_second_level u_second (
    .s (s),
    .z (z),
    .g (g)
  );

  sca_fault_gates #(
    .USE_B_GATES (USE_B_GATES)
  ) u_fault (
    .s      (s),
    .z      (z),
    .g      (g),
    .first  (first),
    .second (second)
  );

endmodule
