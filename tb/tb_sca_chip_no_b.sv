// End-to-end testbench for sca_chip built without the B gates
// (USE_B_GATES = 0), the cheaper variant in which each adder's second group
// holds only A_3 and A_4. Otherwise the same as tb_sca_chip: checked
// additions, T withheld, input-pair faults, and a stuck-at campaign over the
// 28 gates of adder cell 1. Every single fault must still set F, and any
// period with a wrong sum must end with F set.
module tb_sca_chip_no_b;
  import sca_pkg::*;

  localparam int W     = 4;
  localparam int FCELL = 1;
  localparam int NGATE = 28;

  logic clk = 0, rst_n = 0, data_valid = 0;
  dual_rail_t [W-1:0] x = '0, y = '0, sum;
  dual_rail_t         cin = '0, cout;
  logic t, p, t_star, q, nf, ns, fs, f;
  int   checks = 0, failures = 0;

  sca_chip #(.USE_B_GATES(1'b0)) dut (.clk, .rst_n, .data_valid, .x, .y, .cin, .sum, .cout,
                .t, .p, .t_star, .q, .nf, .ns, .fs, .f);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_add = 0, n_ripple = 0, n_t_gated = 0, n_input_fault = 0;
  int n_det_p = 0, n_det_ts = 0, n_det_q = 0, n_reset = 0;
  int n_passive_low = 0, n_inject_high = 0;

  function automatic dual_rail_t [W-1:0] to_dr(input logic [W-1:0] v);
    dual_rail_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = '{h: v[i], l: !v[i]};
    return r;
  endfunction

  logic sv;
  task automatic force_gate(input int id);
    case (id)
      0: force dut.g_bit[FCELL].u_add.u_in.primed[0] = sv;
      1: force dut.g_bit[FCELL].u_add.u_in.primed[1] = sv;
      2: force dut.g_bit[FCELL].u_add.u_in.primed[2] = sv;
      3: force dut.g_bit[FCELL].u_add.u_in.primed[3] = sv;
      4: force dut.g_bit[FCELL].u_add.u_in.primed[4] = sv;
      5: force dut.g_bit[FCELL].u_add.u_in.primed[5] = sv;
      6: force dut.g_bit[FCELL].u_add.u_in.injected[0] = sv;
      7: force dut.g_bit[FCELL].u_add.u_in.injected[1] = sv;
      8: force dut.g_bit[FCELL].u_add.u_in.injected[2] = sv;
      9: force dut.g_bit[FCELL].u_add.u_in.injected[3] = sv;
      10: force dut.g_bit[FCELL].u_add.u_in.injected[4] = sv;
      11: force dut.g_bit[FCELL].u_add.u_in.injected[5] = sv;
      12: force dut.g_bit[FCELL].u_add.u_first.s[0] = sv;
      13: force dut.g_bit[FCELL].u_add.u_first.s[1] = sv;
      14: force dut.g_bit[FCELL].u_add.u_first.s[2] = sv;
      15: force dut.g_bit[FCELL].u_add.u_first.s[3] = sv;
      16: force dut.g_bit[FCELL].u_add.u_first.s[4] = sv;
      17: force dut.g_bit[FCELL].u_add.u_first.s[5] = sv;
      18: force dut.g_bit[FCELL].u_add.u_first.s[6] = sv;
      19: force dut.g_bit[FCELL].u_add.u_first.s[7] = sv;
      20: force dut.g_bit[FCELL].u_add.u_second.zg[0] = sv;
      21: force dut.g_bit[FCELL].u_add.u_second.zg[1] = sv;
      22: force dut.g_bit[FCELL].u_add.u_second.zg[2] = sv;
      23: force dut.g_bit[FCELL].u_add.u_second.zg[3] = sv;
      24: force dut.g_bit[FCELL].u_add.u_fault.a[0] = sv;
      25: force dut.g_bit[FCELL].u_add.u_fault.a[1] = sv;
      26: force dut.g_bit[FCELL].u_add.u_fault.a[2] = sv;
      27: force dut.g_bit[FCELL].u_add.u_fault.a[3] = sv;
      default: ;
    endcase
  endtask
  task automatic release_gate(input int id);
    case (id)
      0: release dut.g_bit[FCELL].u_add.u_in.primed[0];
      1: release dut.g_bit[FCELL].u_add.u_in.primed[1];
      2: release dut.g_bit[FCELL].u_add.u_in.primed[2];
      3: release dut.g_bit[FCELL].u_add.u_in.primed[3];
      4: release dut.g_bit[FCELL].u_add.u_in.primed[4];
      5: release dut.g_bit[FCELL].u_add.u_in.primed[5];
      6: release dut.g_bit[FCELL].u_add.u_in.injected[0];
      7: release dut.g_bit[FCELL].u_add.u_in.injected[1];
      8: release dut.g_bit[FCELL].u_add.u_in.injected[2];
      9: release dut.g_bit[FCELL].u_add.u_in.injected[3];
      10: release dut.g_bit[FCELL].u_add.u_in.injected[4];
      11: release dut.g_bit[FCELL].u_add.u_in.injected[5];
      12: release dut.g_bit[FCELL].u_add.u_first.s[0];
      13: release dut.g_bit[FCELL].u_add.u_first.s[1];
      14: release dut.g_bit[FCELL].u_add.u_first.s[2];
      15: release dut.g_bit[FCELL].u_add.u_first.s[3];
      16: release dut.g_bit[FCELL].u_add.u_first.s[4];
      17: release dut.g_bit[FCELL].u_add.u_first.s[5];
      18: release dut.g_bit[FCELL].u_add.u_first.s[6];
      19: release dut.g_bit[FCELL].u_add.u_first.s[7];
      20: release dut.g_bit[FCELL].u_add.u_second.zg[0];
      21: release dut.g_bit[FCELL].u_add.u_second.zg[1];
      22: release dut.g_bit[FCELL].u_add.u_second.zg[2];
      23: release dut.g_bit[FCELL].u_add.u_second.zg[3];
      24: release dut.g_bit[FCELL].u_add.u_fault.a[0];
      25: release dut.g_bit[FCELL].u_add.u_fault.a[1];
      26: release dut.g_bit[FCELL].u_add.u_fault.a[2];
      27: release dut.g_bit[FCELL].u_add.u_fault.a[3];
      default: ;
    endcase
  endtask

  // One checking period per step; the step number selects what it does:
  //   phase 0: faultless additions (four corner cases, then random, with
  //            data_valid LOW about one period in five)
  //   phase 1: input faults, each after a power-on reset
  //   phase 2: stuck-at campaign, 32 periods per fault, reset before each
  //   phase 3: one faultless addition after a last reset
  localparam int N_FREE  = 304;
  localparam int N_INF   = 16;
  localparam int N_CAMP  = NGATE * 2 * 32;
  localparam int N_STEPS = N_FREE + N_INF + N_CAMP + 1;

  // The step in progress.
  int           step = -1;
  int           ph, k, id, val, combo;
  logic [W-1:0] a, b;
  logic         c, dv;
  bit           strict, ok;
  // Reset handling: cycles of initial reset, a reset cycle in progress, and
  // a restarted period whose P pulse must not start a new step.
  int           boot = 3;
  bit           in_reset = 0, restart = 0;

  // Set up step st and drive its operands.
  task automatic start_step(input int st);
    dual_rail_t [W-1:0] xo;
    bit do_reset;
    a = W'($urandom); b = W'($urandom); c = 1'($urandom);
    dv = 1; strict = 1; do_reset = 0; ok = 1;
    id = 0; val = 0; combo = 0; k = st;
    xo = to_dr(a);
    if (st < N_FREE) begin
      ph = 0;
      case (st)
        0: begin a = '1;    b = '0;    c = 1; end
        1: begin a = W'(8'h55); b = W'(8'hAA); c = 1; end
        2: begin a = '1;    b = '1;    c = 1; end
        3: begin a = '0;    b = '0;    c = 0; end
        default: dv = ($urandom_range(0, 4) != 0);
      endcase
      xo = to_dr(a);
    end else if (st < N_FREE + N_INF) begin
      ph = 1;
      k = st - N_FREE;
      do_reset = 1; strict = 0;
      xo[k % W] = (k < 8) ? '{h: 1'b1, l: 1'b1} : '{h: 1'b0, l: 1'b0};
    end else if (st < N_FREE + N_INF + N_CAMP) begin
      ph = 2;
      k = st - N_FREE - N_INF;
      combo = k % 32;
      val = (k / 32) % 2;
      id = k / 64;
      strict = 0;
      a[1:0] = 2'(combo);
      b[1:0] = 2'(combo >> 2);
      c = 1'(combo >> 4);
      xo = to_dr(a);
      do_reset = (combo == 0);
      if (combo == 0) begin
        sv = val[0];
        force_gate(id);
      end
    end else begin
      ph = 3;
      do_reset = 1; a = W'(8'h0F); b = W'(8'hF0); c = 1;
      xo = to_dr(a);
    end
    x          <= xo;
    y          <= to_dr(b);
    cin        <= '{h: c, l: !c};
    data_valid <= dv;
    if (do_reset) begin
      rst_n    <= 1'b0;
      in_reset = 1;
      restart  = 1;
    end
  endtask

  // Judge the step that has just ended; F now holds its whole period.
  task automatic finish_step();
    if (ph == 0 && step == N_FREE - 1) begin
      checks++;
      if (f !== 1'b0) begin failures++; $display("FAIL F set while faultless"); end
    end
    if (ph == 1) begin
      checks++;
      if (f !== 1'b1) begin
        failures++;
        $display("FAIL input fault at bit %0d not signalled", k % W);
      end else n_input_fault++;
    end
    if (ph == 2) begin
      if (!ok) begin
        checks++;
        if (f !== 1'b1) begin
          failures++;
          $display("FAIL gate %0d stuck at %0d: wrong sum with no fault signal", id, val);
        end
      end
      if (combo == 31) begin
        checks++;
        if (f !== 1'b1) begin
          failures++;
          $display("FAIL gate %0d stuck at %0d never signalled", id, val);
        end
        release_gate(id);
      end
    end
  endtask

  // Check the result of the active interval, seen in the Q cycle.
  task automatic check_result();
    logic [W:0] exp_s, got;
    bit compl;
    exp_s = {1'b0, a} + {1'b0, b} + (W + 1)'(c);
    if (dv) begin
      compl = 1;
      for (int i = 0; i < W; i++) begin
        compl &= sum[i].h ^ sum[i].l;
        got[i] = sum[i].h;
      end
      compl &= cout.h ^ cout.l;
      got[W] = cout.h;
      ok = t && compl && got == exp_s;
      if (strict) begin
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL %0d + %0d + %0d gave %0d (t=%b complementary=%b)", a, b, c, got, t, compl);
        end else begin
          n_add++;
          if (exp_s[W] && (a ^ b) == '1 && c) n_ripple++;
        end
      end
    end else begin
      checks++;
      if (t !== 1'b0 || sum !== '0 || cout !== '0) begin
        failures++;
        $display("FAIL T not withheld when data_valid was LOW");
      end else n_t_gated++;
    end
  endtask

  task automatic report();
    $display("additions %0d, full-width ripples %0d, T withheld %0d, input faults %0d",
             n_add, n_ripple, n_t_gated, n_input_fault);
    $display("first detections: P test %0d, T* test %0d, active test %0d; resets %0d",
             n_det_p, n_det_ts, n_det_q, n_reset);
    $display("passive outputs LOW %0d, injection outputs HIGH %0d", n_passive_low, n_inject_high);
    checks++;
    if (n_add == 0 || n_ripple == 0 || n_t_gated == 0 || n_input_fault == 0 ||
        n_det_p == 0 || n_det_ts == 0 || n_det_q == 0 || n_reset == 0 ||
        n_passive_low == 0 || n_inject_high == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // One process does all the work. At each rising edge it reads the values
  // of the cycle that has just ended; what it drives takes effect after the
  // edge.
  always @(posedge clk) begin
    if (boot > 0) begin
      boot--;
      if (boot == 0) rst_n <= 1'b1;
    end else if (in_reset) begin
      checks++;
      if (f !== 1'b0) begin failures++; $display("FAIL reset did not clear F"); end
      else n_reset++;
      rst_n    <= 1'b1;
      in_reset = 0;
    end else begin
      // Which test sets F first.
      if (!f) begin
        if (p && nf)            n_det_p++;
        else if (t_star && ns)  n_det_ts++;
        else if (t && q && fs)  n_det_q++;
      end
      if (p) begin
        if (strict && step >= 0) begin
          checks++;
          if (sum !== '0 || cout !== '0) begin
            failures++;
            $display("FAIL passive outputs not LOW");
          end else n_passive_low++;
        end
        if (restart) begin
          restart = 0;
        end else begin
          if (step >= 0) finish_step();
          step++;
          if (step == N_STEPS) report();
          else start_step(step);
        end
      end
      if (t_star && strict && step >= 0) begin
        checks++;
        if (sum !== '1 || cout !== '1) begin
          failures++;
          $display("FAIL injection outputs not HIGH");
        end else n_inject_high++;
      end
      if (q && step >= 0 && !restart) check_result();
    end
  end
endmodule
