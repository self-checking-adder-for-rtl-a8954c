// Check clock generator: the four impulses T, P, T* and Q.
//
// One checking period is a passive interval followed by an active interval.
// In the passive interval the add clock T is LOW; the generator first gives
// the pulse P (test without fault injection, FIRST GROUP must be HIGH) and
// then the fault-injection pulse T* (SECOND GROUP must be HIGH). In the
// active interval T is HIGH and the adders compute; near its end, once the
// sums have settled, the pulse Q strobes the test that every fault wire is
// LOW. P, T* and Q come every period. T is raised only if data_valid is HIGH
// in the cycle before the active interval starts, i.e. only when the
// operands reaching the checked adders are meaningful; it then stays HIGH
// for the whole active interval.
//
// Timing, in cycles of clk, counting from the start of a period:
//   0              P
//   1              gap
//   2              T*
//   3              gap (data_valid sampled here)
//   4 .. 4+ACT-1   T (if enabled)
//   4+ACT-2        Q
// so a period lasts 4 + ACT_CYCLES cycles. All four outputs come straight
// from flip-flops. rst_n (asynchronous, active LOW) restarts the period with
// every output LOW.
//
// The four signals, their roles and their order (P test, then T* test in
// the passive interval, Q test inside T) follow the original design; the
// cycle counts, one-cycle pulse widths and the synchronous realisation are
// this design's own choices.
module check_clock_gen #(
  parameter int unsigned ACT_CYCLES = 4  // length of the active interval, >= 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic data_valid,
  output logic t,
  output logic p,
  output logic t_star,
  output logic q
);

  localparam int unsigned PERIOD = 4 + ACT_CYCLES;
  localparam int unsigned CW     = $clog2(PERIOD);

  typedef logic [CW-1:0] slot_t;

  localparam slot_t SLOT_P     = slot_t'(0);
  localparam slot_t SLOT_TSTAR = slot_t'(2);
  localparam slot_t SLOT_GATE  = slot_t'(3);
  localparam slot_t SLOT_LAST  = slot_t'(PERIOD - 1);
  localparam slot_t SLOT_Q     = slot_t'(PERIOD - 2);

  // Slot the outputs currently show.
  slot_t slot;
  slot_t slot_next;

  always_comb slot_next = (slot == SLOT_LAST) ? '0 : slot + slot_t'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot   <= SLOT_LAST;
      t      <= 1'b0;
      p      <= 1'b0;
      t_star <= 1'b0;
      q      <= 1'b0;
    end else begin
      slot   <= slot_next;
      p      <= (slot_next == SLOT_P);
      t_star <= (slot_next == SLOT_TSTAR);
      q      <= (slot_next == SLOT_Q);
      if (slot == SLOT_GATE) begin
        t <= data_valid;
      end else if (slot == SLOT_LAST) begin
        t <= 1'b0;
      end
    end
  end

  initial begin
    assert (ACT_CYCLES >= 2)
      else $error("check_clock_gen: ACT_CYCLES must be at least 2");
  end

endmodule
