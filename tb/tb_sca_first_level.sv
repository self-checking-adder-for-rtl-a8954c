// Testbench for sca_first_level: all 64 rail patterns.
// For each pattern the expected S_i is LOW exactly when the rails "agree"
// with state i: the X rail selected by bit 0 of i, the Y rail by bit 1 and
// the C rail by bit 2 are all HIGH. The eight faultless patterns are also
// checked against the one-LOW-out-of-eight table, and the all-LOW and
// all-HIGH patterns against the passive and fault-injection values.
module tb_sca_first_level;
  import sca_pkg::*;

  rails_t     rails;
  logic [7:0] s;
  int         checks = 0, failures = 0;

  sca_first_level dut (.rails, .s);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp_s, input string what);
    checks++;
    if (s !== exp_s) begin
      failures++;
      $display("FAIL %s rails=%b s=%b expected %b", what, rails, s, exp_s);
    end
  endtask

  initial begin
    // Exhaustive.
    for (int v = 0; v < 64; v++) begin
      logic [7:0] exp_s;
      rails = rails_t'(v[5:0]);
      #1;
      for (int i = 0; i < 8; i++) begin
        bit xr, yr, cr;
        xr = (i % 2)       ? rails.x1 : rails.x0;
        yr = ((i / 2) % 2) ? rails.y1 : rails.y0;
        cr = (i / 4)       ? rails.c1 : rails.c0;
        exp_s[i] = !(xr && yr && cr);
      end
      check(exp_s, "exhaustive");
    end
    // Faultless states: S_i = 0 for i = 4C + 2Y + X, all others 1.
    for (int st = 0; st < 8; st++) begin
      bit xv, yv, cv;
      xv = st[0]; yv = st[1]; cv = st[2];
      rails = '{x1: xv, x0: !xv, y1: yv, y0: !yv, c1: cv, c0: !cv};
      #1;
      check(~(8'b1 << st), "one-from-eight");
    end
    rails = '0;  #1; check(8'hFF, "passive");
    rails = '1;  #1; check(8'h00, "fault injection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
