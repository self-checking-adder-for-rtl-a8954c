// Testbench for sca_fault_gates, with and without the B gates.
// Part 1 drives all 4096 combinations of S, Z and G and compares every
// fault wire with its definition (A: both rails of a pair equal; B: both S
// signals of its pair LOW).
// Part 2 checks the property the B gates exist for: over all 256 S
// patterns, with Z and G taken from the second-level code (worked out here
// from the state arithmetic), a pattern that has more than one LOW S but
// still gives complementary outputs must raise some B wire, and a faultless
// one-LOW pattern must raise none.
module tb_sca_fault_gates;
  import sca_pkg::*;

  logic [7:0] s;
  dual_rail_t z, g;
  logic [1:0] first, first_nb;
  logic [7:0] second;
  logic [1:0] second_nb;
  int         checks = 0, failures = 0;

  sca_fault_gates #(.USE_B_GATES(1'b1)) dut    (.s, .z, .g, .first, .second);
  sca_fault_gates #(.USE_B_GATES(1'b0)) dut_nb (.s, .z, .g, .first(first_nb), .second(second_nb));

  // B_1 .. B_6 watch these pairs of S signals.
  localparam int PAIR_A [6] = '{1, 1, 2, 3, 3, 5};
  localparam int PAIR_B [6] = '{4, 2, 4, 6, 5, 6};

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      logic [1:0] ef;
      logic [7:0] es;
      s = v[7:0];
      z = '{h: v[8],  l: v[9]};
      g = '{h: v[10], l: v[11]};
      #1;
      ef    = {(g.h == 0 && g.l == 0), (z.h == 0 && z.l == 0)};
      es[0] = (g.h == 1 && g.l == 1);   // A_3
      es[1] = (z.h == 1 && z.l == 1);   // A_4
      for (int k = 0; k < 6; k++) es[2+k] = (s[PAIR_A[k]] == 0 && s[PAIR_B[k]] == 0);
      checks++;
      if (first !== ef || second !== es || first_nb !== ef || second_nb !== es[1:0]) begin
        failures++;
        $display("FAIL s=%b z=%b g=%b first=%b second=%b (no B: %b %b) expected %b %b",
                 s, z, g, first, second, first_nb, second_nb, ef, es);
      end
    end

    for (int v = 0; v < 256; v++) begin
      bit ez1, ez0, eg1, eg0;
      int nlow;
      s = v[7:0];
      ez1 = 0; ez0 = 0; eg1 = 0; eg0 = 0; nlow = 0;
      for (int i = 0; i < 8; i++) begin
        if (!s[i]) begin
          int n;
          nlow++;
          n = (i % 2) + ((i / 2) % 2) + (i / 4);
          if (n % 2 == 1) ez1 = 1; else ez0 = 1;
          if (n >= 2)     eg1 = 1; else eg0 = 1;
        end
      end
      z = '{h: ez1, l: ez0};
      g = '{h: eg1, l: eg0};
      #1;
      if ((ez1 ^ ez0) && (eg1 ^ eg0)) begin
        checks++;
        if (nlow == 1 && (first != 0 || second != 0)) begin
          failures++;
          $display("FAIL faultless s=%b raised first=%b second=%b", s, first, second);
        end
        if (nlow > 1 && second[7:2] == 0) begin
          failures++;
          $display("FAIL s=%b has %0d LOW signals but no B gate fired", s, nlow);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
