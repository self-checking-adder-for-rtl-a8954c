// Fault signalization block.
//
// Collects the fault wires of all checked components of a chip in two
// groups and sets the fault flag F when a check fails:
//   1. while P is HIGH     : NF = NAND(FIRST GROUP);  P  AND NF sets F
//   2. while T* is HIGH    : NS = NAND(SECOND GROUP); T* AND NS sets F
//   3. while T and Q HIGH  : FS = OR(both groups);    T AND Q AND FS sets F
// F is an R-S flip-flop: once set it stays set. It is cleared only by the
// power-on reset, never by the checks. F can stop the processing or light a
// LED.
//
// Interface: clk, rst_n (power-on reset, asynchronous, active LOW), the
// check pulses t, p, t_star, q, the two groups of fault wires, and F. nf, ns
// and fs are the three test signals, brought out for observation.
// Timing: the set term is sampled on the rising edge of clk, so F goes HIGH
// on the edge that ends a cycle in which a check failed.
//
// The three tests, their gating and the set-only flip-flop follow the
// original design. Its text gates the second test with T in one place and
// with T* in another; its figure shows T*, which is what is built here. The
// clocked flip-flop replaces the original asynchronous R-S flip-flop.
module fault_signalizer #(
  parameter int unsigned N_FIRST  = 2,  // FIRST GROUP wires (A_1, A_2 type)
  parameter int unsigned N_SECOND = 8   // SECOND GROUP wires (A_3, A_4, B type)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                t,
  input  logic                p,
  input  logic                t_star,
  input  logic                q,
  input  logic [N_FIRST-1:0]  first,
  input  logic [N_SECOND-1:0] second,
  output logic                nf,
  output logic                ns,
  output logic                fs,
  output logic                f
);

  logic set_f;

  always_comb begin
    nf    = ~(&first);
    ns    = ~(&second);
    fs    = (|first) | (|second);
    set_f = (p & nf) | (t_star & ns) | (t & q & fs);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f <= 1'b0;
    end else if (set_f) begin
      f <= 1'b1;
    end
  end

endmodule
