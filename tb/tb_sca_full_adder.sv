// Testbench for sca_full_adder.
// Part 1, fault-free cell, all 64 input-wire patterns in each of the three
// clock states:
//   T = T* = 0 : all outputs LOW, FIRST GROUP all HIGH, SECOND GROUP LOW
//   T* = 1     : all outputs HIGH, SECOND GROUP all HIGH, FIRST GROUP LOW
//   T = 1      : valid double-rail inputs give X + Y + C = 2G + Z and no
//                fault wire HIGH; any input pair with H == L raises at least
//                one fault wire.
// Part 2, single stuck-at faults: every one of the 34 gates is forced to 0
// and to 1 in turn, then each of the 28 gates of a cell built without the
// B gates. Either cell must then fail the passive check, the fault-
// injection check, or the active check for at least one of the eight valid
// input states.
// Part 3 reproduces the double fault the checks cannot see (X'_0 stuck at 0
// with both X rails HIGH) and shows it caught once X_L = 1, X_H = 0.
module tb_sca_full_adder;
  import sca_pkg::*;

  logic       t, t_star;
  dual_rail_t x, y, c;
  dual_rail_t z, g;
  logic [1:0] first;
  logic [7:0] second;
  int         checks = 0, failures = 0;

  sca_full_adder dut (.t, .t_star, .x, .y, .c, .z, .g, .first, .second);

  // The cheaper variant without B gates, for the single-fault campaign.
  dual_rail_t z_nb, g_nb;
  logic [1:0] first_nb, second_nb;
  sca_full_adder #(.USE_B_GATES(1'b0)) dut_nb (
    .t, .t_star, .x, .y, .c, .z(z_nb), .g(g_nb), .first(first_nb), .second(second_nb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic tt, input logic ts, input logic [5:0] in);
    t = tt; t_star = ts;
    x = '{h: in[5], l: in[4]};
    y = '{h: in[3], l: in[2]};
    c = '{h: in[1], l: in[0]};
    #1;
  endtask

  // Check outcome of one clock state with the fault present: 1 = flagged.
  // nb selects the variant without B gates.
  function automatic bit passive_fails(input bit nb);
    return nb ? first_nb != 2'b11 : first != 2'b11;
  endfunction
  function automatic bit inject_fails(input bit nb);
    return nb ? second_nb != 2'b11 : second != 8'hFF;
  endfunction
  function automatic bit active_fails(input bit nb);
    return nb ? (first_nb != 0) || (second_nb != 0) : (first != 0) || (second != 0);
  endfunction

  logic sv;  // stuck-at value

  task automatic force_gate(input int id);
    case (id)
      0:  force dut.u_in.primed[0]   = sv;
      1:  force dut.u_in.primed[1]   = sv;
      2:  force dut.u_in.primed[2]   = sv;
      3:  force dut.u_in.primed[3]   = sv;
      4:  force dut.u_in.primed[4]   = sv;
      5:  force dut.u_in.primed[5]   = sv;
      6:  force dut.u_in.injected[0] = sv;
      7:  force dut.u_in.injected[1] = sv;
      8:  force dut.u_in.injected[2] = sv;
      9:  force dut.u_in.injected[3] = sv;
      10: force dut.u_in.injected[4] = sv;
      11: force dut.u_in.injected[5] = sv;
      12: force dut.u_first.s[0]     = sv;
      13: force dut.u_first.s[1]     = sv;
      14: force dut.u_first.s[2]     = sv;
      15: force dut.u_first.s[3]     = sv;
      16: force dut.u_first.s[4]     = sv;
      17: force dut.u_first.s[5]     = sv;
      18: force dut.u_first.s[6]     = sv;
      19: force dut.u_first.s[7]     = sv;
      20: force dut.u_second.zg[0]   = sv;
      21: force dut.u_second.zg[1]   = sv;
      22: force dut.u_second.zg[2]   = sv;
      23: force dut.u_second.zg[3]   = sv;
      24: force dut.u_fault.a[0]     = sv;
      25: force dut.u_fault.a[1]     = sv;
      26: force dut.u_fault.a[2]     = sv;
      27: force dut.u_fault.a[3]     = sv;
      28: force dut.u_fault.g_b.b[0] = sv;
      29: force dut.u_fault.g_b.b[1] = sv;
      30: force dut.u_fault.g_b.b[2] = sv;
      31: force dut.u_fault.g_b.b[3] = sv;
      32: force dut.u_fault.g_b.b[4] = sv;
      33: force dut.u_fault.g_b.b[5] = sv;
      default: ;
    endcase
  endtask

  task automatic release_gate(input int id);
    case (id)
      0:  release dut.u_in.primed[0];
      1:  release dut.u_in.primed[1];
      2:  release dut.u_in.primed[2];
      3:  release dut.u_in.primed[3];
      4:  release dut.u_in.primed[4];
      5:  release dut.u_in.primed[5];
      6:  release dut.u_in.injected[0];
      7:  release dut.u_in.injected[1];
      8:  release dut.u_in.injected[2];
      9:  release dut.u_in.injected[3];
      10: release dut.u_in.injected[4];
      11: release dut.u_in.injected[5];
      12: release dut.u_first.s[0];
      13: release dut.u_first.s[1];
      14: release dut.u_first.s[2];
      15: release dut.u_first.s[3];
      16: release dut.u_first.s[4];
      17: release dut.u_first.s[5];
      18: release dut.u_first.s[6];
      19: release dut.u_first.s[7];
      20: release dut.u_second.zg[0];
      21: release dut.u_second.zg[1];
      22: release dut.u_second.zg[2];
      23: release dut.u_second.zg[3];
      24: release dut.u_fault.a[0];
      25: release dut.u_fault.a[1];
      26: release dut.u_fault.a[2];
      27: release dut.u_fault.a[3];
      28: release dut.u_fault.g_b.b[0];
      29: release dut.u_fault.g_b.b[1];
      30: release dut.u_fault.g_b.b[2];
      31: release dut.u_fault.g_b.b[3];
      32: release dut.u_fault.g_b.b[4];
      33: release dut.u_fault.g_b.b[5];
      default: ;
    endcase
  endtask

  task automatic force_gate_nb(input int id);
    case (id)
      0:  force dut_nb.u_in.primed[0]   = sv;
      1:  force dut_nb.u_in.primed[1]   = sv;
      2:  force dut_nb.u_in.primed[2]   = sv;
      3:  force dut_nb.u_in.primed[3]   = sv;
      4:  force dut_nb.u_in.primed[4]   = sv;
      5:  force dut_nb.u_in.primed[5]   = sv;
      6:  force dut_nb.u_in.injected[0] = sv;
      7:  force dut_nb.u_in.injected[1] = sv;
      8:  force dut_nb.u_in.injected[2] = sv;
      9:  force dut_nb.u_in.injected[3] = sv;
      10: force dut_nb.u_in.injected[4] = sv;
      11: force dut_nb.u_in.injected[5] = sv;
      12: force dut_nb.u_first.s[0]     = sv;
      13: force dut_nb.u_first.s[1]     = sv;
      14: force dut_nb.u_first.s[2]     = sv;
      15: force dut_nb.u_first.s[3]     = sv;
      16: force dut_nb.u_first.s[4]     = sv;
      17: force dut_nb.u_first.s[5]     = sv;
      18: force dut_nb.u_first.s[6]     = sv;
      19: force dut_nb.u_first.s[7]     = sv;
      20: force dut_nb.u_second.zg[0]   = sv;
      21: force dut_nb.u_second.zg[1]   = sv;
      22: force dut_nb.u_second.zg[2]   = sv;
      23: force dut_nb.u_second.zg[3]   = sv;
      24: force dut_nb.u_fault.a[0]     = sv;
      25: force dut_nb.u_fault.a[1]     = sv;
      26: force dut_nb.u_fault.a[2]     = sv;
      27: force dut_nb.u_fault.a[3]     = sv;
      default: ;
    endcase
  endtask

  task automatic release_gate_nb(input int id);
    case (id)
      0:  release dut_nb.u_in.primed[0];
      1:  release dut_nb.u_in.primed[1];
      2:  release dut_nb.u_in.primed[2];
      3:  release dut_nb.u_in.primed[3];
      4:  release dut_nb.u_in.primed[4];
      5:  release dut_nb.u_in.primed[5];
      6:  release dut_nb.u_in.injected[0];
      7:  release dut_nb.u_in.injected[1];
      8:  release dut_nb.u_in.injected[2];
      9:  release dut_nb.u_in.injected[3];
      10: release dut_nb.u_in.injected[4];
      11: release dut_nb.u_in.injected[5];
      12: release dut_nb.u_first.s[0];
      13: release dut_nb.u_first.s[1];
      14: release dut_nb.u_first.s[2];
      15: release dut_nb.u_first.s[3];
      16: release dut_nb.u_first.s[4];
      17: release dut_nb.u_first.s[5];
      18: release dut_nb.u_first.s[6];
      19: release dut_nb.u_first.s[7];
      20: release dut_nb.u_second.zg[0];
      21: release dut_nb.u_second.zg[1];
      22: release dut_nb.u_second.zg[2];
      23: release dut_nb.u_second.zg[3];
      24: release dut_nb.u_fault.a[0];
      25: release dut_nb.u_fault.a[1];
      26: release dut_nb.u_fault.a[2];
      27: release dut_nb.u_fault.a[3];
      default: ;
    endcase
  endtask

  function automatic logic [5:0] state_wires(input int st);
    bit xv, yv, cv;
    xv = st[0]; yv = st[1]; cv = st[2];
    return {xv, !xv, yv, !yv, cv, !cv};
  endfunction

  initial begin
    // Part 1: fault-free cell.
    for (int v = 0; v < 64; v++) begin
      logic [5:0] in;
      bit valid;
      in = v[5:0];
      valid = (in[5] ^ in[4]) && (in[3] ^ in[2]) && (in[1] ^ in[0]);

      apply(1'b0, 1'b0, in);
      checks++;
      if ({z, g} !== 4'b0000 || first !== 2'b11 || second !== 8'h00) begin
        failures++;
        $display("FAIL passive in=%b z=%b g=%b first=%b second=%b", in, z, g, first, second);
      end

      apply(1'b0, 1'b1, in);
      checks++;
      if ({z, g} !== 4'b1111 || first !== 2'b00 || second !== 8'hFF) begin
        failures++;
        $display("FAIL injection in=%b z=%b g=%b first=%b second=%b", in, z, g, first, second);
      end

      apply(1'b1, 1'b0, in);
      checks++;
      if (valid) begin
        int sum;
        sum = int'(in[5]) + int'(in[3]) + int'(in[1]);
        if (!(z.h ^ z.l) || !(g.h ^ g.l) || (2 * int'(g.h) + int'(z.h)) != sum ||
            first !== 2'b00 || second !== 8'h00) begin
          failures++;
          $display("FAIL active in=%b z=%b g=%b first=%b second=%b (sum %0d)",
                   in, z, g, first, second, sum);
        end
      end else if (first == 0 && second == 0) begin
        failures++;
        $display("FAIL faulty input in=%b not signalled", in);
      end
    end

    // Part 2: single stuck-at faults, with the B gates (34 gates) and
    // without them (28 gates).
    for (int nbv = 0; nbv < 2; nbv++) begin
      for (int id = 0; id < (nbv ? 28 : 34); id++) begin
        for (int val = 0; val < 2; val++) begin
          bit caught, nb;
          nb = nbv[0];
          sv = val[0];
          if (nb) force_gate_nb(id); else force_gate(id);
          caught = 0;
          apply(1'b0, 1'b0, 6'b0);  if (passive_fails(nb)) caught = 1;
          apply(1'b0, 1'b1, 6'b0);  if (inject_fails(nb))  caught = 1;
          for (int st = 0; st < 8; st++) begin
            apply(1'b1, 1'b0, state_wires(st));
            if (active_fails(nb)) caught = 1;
          end
          checks++;
          if (!caught) begin
            failures++;
            $display("FAIL %s gate %0d stuck at %0d passes all three checks",
                     nb ? "no-B" : "B", id, val);
          end
          if (nb) release_gate_nb(id); else release_gate(id);
          #1;
        end
      end
    end

    // Part 3: the double fault that escapes. X'_0 stuck at 0 together with
    // an input fault X_L = X_H = 1 looks like a valid X = 1: no check may
    // fire. Once the operand has X = 1 correctly (X_L = 0, X_H = 1) the
    // stuck gate is invisible too, but X = 0 (X_L = 1, X_H = 0) exposes it.
    begin
      bit seen_p, seen_i, seen_a;
      sv = 1'b0;
      force_gate(4);  // primed[4] is X'_0
      seen_p = 0; seen_i = 0; seen_a = 0;
      apply(1'b0, 1'b0, 6'b0);  seen_p = passive_fails(0);
      apply(1'b0, 1'b1, 6'b0);  seen_i = inject_fails(0);
      for (int st = 0; st < 4; st++) begin
        apply(1'b1, 1'b0, {1'b1, 1'b1, st[0], !st[0], st[1], !st[1]});
        if (active_fails(0)) seen_a = 1;
      end
      checks++;
      if (seen_p || seen_i || seen_a) begin
        failures++;
        $display("FAIL masked double fault was signalled (%b%b%b)", seen_p, seen_i, seen_a);
      end
      apply(1'b1, 1'b0, 6'b01_10_10);
      checks++;
      if (!active_fails(0)) begin
        failures++;
        $display("FAIL X'_0 stuck at 0 not signalled with X_L = 1, X_H = 0");
      end
      release_gate(4);
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
