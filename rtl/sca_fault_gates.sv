// Fault-signal gates of the self-checking full adder.
//
// Ten gates watch the two codes of the adder:
//   A_1 = NOR(Z_1, Z_0)   A_2 = NOR(G_1, G_0)   -- both output rails LOW
//   A_4 = AND(Z_1, Z_0)   A_3 = AND(G_1, G_0)   -- both output rails HIGH
//   B_1 = NOR(S_1, S_4)   B_2 = NOR(S_1, S_2)   B_3 = NOR(S_2, S_4)
//   B_4 = NOR(S_3, S_6)   B_5 = NOR(S_3, S_5)   B_6 = NOR(S_5, S_6)
// The A gates catch an output pair that is not complementary. The B gates
// catch the six pairs of LOW S signals that still give a complementary
// output (two or three of S_1, S_2, S_4, or of S_3, S_5, S_6): such an S
// pattern is a code violation the A gates cannot see.
//
// Faultless behaviour: passive interval (T = T* = 0) A_1 = A_2 = 1, all
// others 0; fault injection (T* = 1) A_3 = A_4 = B_k = 1, A_1 = A_2 = 0;
// after an addition all ten are 0.
//
// Interface: s, z, g in; first = {A_2, A_1} (FIRST GROUP) and
// second = {B_6..B_1, A_4, A_3} (SECOND GROUP) out, or second = {A_4, A_3}
// when USE_B_GATES is 0. The original design keeps the B gates and names
// leaving them out as a cheaper option that keeps single-fault detection but
// loses some multiple-fault detection. Purely combinational.
//
// A_1 as a NOR of Z_1 and Z_0 is given in the original description; the
// other A gates follow from its complementarity condition, and the B gate
// pairs from its table of S patterns that give a complementary output.
// S_0 and S_7 feed no B gate: no pattern with either of them LOW and a
// second S LOW gives a complementary output, so the A gates already see it.
module sca_fault_gates
  import sca_pkg::*;
#(
  parameter bit USE_B_GATES = 1'b1,
  localparam int unsigned NSEC = n_second(USE_B_GATES)
) (
  input  logic [7:0]      s,
  input  dual_rail_t      z,
  input  dual_rail_t      g,
  output logic [N_FIRST_PER_ADDER-1:0] first,
  output logic [NSEC-1:0] second
);

  // A_4 A_3 A_2 A_1 (bit 3 down to bit 0).
  logic [3:0] a;

  always_comb begin
    a[0] = ~(z.h | z.l);  // A_1
    a[1] = ~(g.h | g.l);  // A_2
    a[2] = g.h & g.l;     // A_3
    a[3] = z.h & z.l;     // A_4
    first = a[1:0];
  end

  if (USE_B_GATES) begin : g_b
    // B_6 .. B_1 (bit 5 down to bit 0).
    logic [5:0] b;
    always_comb begin
      b[0] = ~(s[1] | s[4]);  // B_1
      b[1] = ~(s[1] | s[2]);  // B_2
      b[2] = ~(s[2] | s[4]);  // B_3
      b[3] = ~(s[3] | s[6]);  // B_4
      b[4] = ~(s[3] | s[5]);  // B_5
      b[5] = ~(s[5] | s[6]);  // B_6
      second = {b, a[3:2]};
    end
  end else begin : g_no_b
    // Without the B gates the S signals are not watched directly.
    always_comb second = a[3:2];
  end

endmodule
