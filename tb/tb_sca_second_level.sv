// Testbench for sca_second_level: all 256 S patterns.
// A wire of the two-from-four code is HIGH when some LOW S_i belongs to its
// set; the sets are worked out here from arithmetic on the state index i =
// 4C + 2Y + X: Z_1 for odd sums, Z_0 for even sums, G_1 for sums of two or
// more, G_0 for sums below two. For the eight one-LOW patterns the outputs
// must also satisfy X + Y + C = 2G + Z with complementary rails.
module tb_sca_second_level;
  import sca_pkg::*;

  logic [7:0] s;
  dual_rail_t z, g;
  int         checks = 0, failures = 0;

  sca_second_level dut (.s, .z, .g);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bit ez1, ez0, eg1, eg0;
      s = v[7:0];
      #1;
      ez1 = 0; ez0 = 0; eg1 = 0; eg0 = 0;
      for (int i = 0; i < 8; i++) begin
        if (!s[i]) begin
          int n;
          n = (i % 2) + ((i / 2) % 2) + (i / 4);
          if (n % 2 == 1) ez1 = 1; else ez0 = 1;
          if (n >= 2)     eg1 = 1; else eg0 = 1;
        end
      end
      checks++;
      if ({z.h, z.l, g.h, g.l} !== {ez1, ez0, eg1, eg0}) begin
        failures++;
        $display("FAIL s=%b zg=%b%b%b%b expected %b%b%b%b", s, z.h, z.l, g.h, g.l,
                 ez1, ez0, eg1, eg0);
      end
    end
    // Arithmetic on the faultless patterns.
    for (int st = 0; st < 8; st++) begin
      int sum;
      s = ~(8'b1 << st);
      #1;
      sum = st[0] + st[1] + st[2];
      checks++;
      if (!(z.h ^ z.l) || !(g.h ^ g.l) || (2 * int'(g.h) + int'(z.h)) != sum) begin
        failures++;
        $display("FAIL state %0d: z=%b%b g=%b%b", st, z.h, z.l, g.h, g.l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
