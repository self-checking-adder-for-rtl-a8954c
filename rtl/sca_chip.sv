// Self-checking ripple-carry adder with on-chip fault signalization.
//
// WIDTH self-checking full adders form a ripple-carry chain: the double-rail
// carry-out (G_1, G_0) of bit i is the carry-in (C_H, C_L) of bit i+1. A
// check clock generator drives every adder with the add clock T and the
// fault-injection pulse T*, and gives the test pulses P and Q. The FIRST
// GROUP (A_1, A_2) and SECOND GROUP (A_3, A_4, B_1..B_6) fault wires of all
// adders are gathered into one fault signalizer, whose flag F goes HIGH and
// stays HIGH when any adder fails any of the three checks.
//
// Interface:
//   clk, rst_n       system clock, power-on reset (asynchronous, active LOW)
//   data_valid       operands are meaningful; lets the next T through
//   x, y             WIDTH-bit operands, one double-rail pair per bit
//   cin              carry-in, double rail
//   sum              WIDTH-bit sum, one double-rail pair per bit
//   cout             carry-out, double rail
//   t, p, t_star, q  the check pulses, for the surrounding logic
//   nf, ns, fs       the three test signals of the fault signalizer
//   f                fault flag
// Timing: the operands must be stable while T is HIGH. The sum is valid
// while T is HIGH and is certainly settled when Q is HIGH; every pair is
// complementary then. In the passive interval all output rails are LOW, and
// during T* they are all HIGH. A period lasts 4 + ACT_CYCLES clk cycles.
//
// The adder cell, the grouping of fault wires and the three checks follow
// the original design; the word width, the clocked rendering and the cycle
// counts are this design's own choices.
module sca_chip
  import sca_pkg::*;
#(
  parameter int unsigned WIDTH       = 4,
  parameter bit          USE_B_GATES = 1'b1,
  parameter int unsigned ACT_CYCLES  = 4,
  localparam int unsigned NSEC       = n_second(USE_B_GATES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   data_valid,
  input  dual_rail_t [WIDTH-1:0] x,
  input  dual_rail_t [WIDTH-1:0] y,
  input  dual_rail_t             cin,
  output dual_rail_t [WIDTH-1:0] sum,
  output dual_rail_t             cout,
  output logic                   t,
  output logic                   p,
  output logic                   t_star,
  output logic                   q,
  output logic                   nf,
  output logic                   ns,
  output logic                   fs,
  output logic                   f
);

  // carry[i] enters bit i; carry[WIDTH] leaves the chain.
  dual_rail_t [WIDTH:0]            carry;
  logic       [WIDTH-1:0][N_FIRST_PER_ADDER-1:0] first_w;
  logic       [WIDTH-1:0][NSEC-1:0] second_w;

  check_clock_gen #(
    .ACT_CYCLES (ACT_CYCLES)
  ) u_clk (
    .clk        (clk),
    .rst_n      (rst_n),
    .data_valid (data_valid),
    .t          (t),
    .p          (p),
    .t_star     (t_star),
    .q          (q)
  );

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    sca_full_adder #(
      .USE_B_GATES (USE_B_GATES)
    ) u_add (
      .t      (t),
      .t_star (t_star),
      .x      (x[i]),
      .y      (y[i]),
      .c      (carry[i]),
      .z      (sum[i]),
      .g      (carry[i+1]),
      .first  (first_w[i]),
      .second (second_w[i])
    );
  end

  assign cout = carry[WIDTH];

  fault_signalizer #(
    .N_FIRST  (N_FIRST_PER_ADDER * WIDTH),
    .N_SECOND (NSEC * WIDTH)
  ) u_sig (
    .clk    (clk),
    .rst_n  (rst_n),
    .t      (t),
    .p      (p),
    .t_star (t_star),
    .q      (q),
    .first  (first_w),
    .second (second_w),
    .nf     (nf),
    .ns     (ns),
    .fs     (fs),
    .f      (f)
  );

endmodule
