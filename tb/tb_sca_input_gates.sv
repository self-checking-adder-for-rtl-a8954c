// Testbench for sca_input_gates: all 256 combinations of T, T* and the six
// input wires. Expected rails: LOW when T = T* = 0, HIGH when T* = 1, equal
// to the inputs (X_1 = X_H, X_0 = X_L, ...) when T = 1 and T* = 0.
module tb_sca_input_gates;
  import sca_pkg::*;

  logic       t, t_star;
  dual_rail_t x, y, c;
  rails_t     rails;
  int         checks = 0, failures = 0;

  sca_input_gates dut (.t, .t_star, .x, .y, .c, .rails);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [5:0] in, exp_r;
      in     = v[5:0];
      t      = v[6];
      t_star = v[7];
      x      = '{h: in[5], l: in[4]};
      y      = '{h: in[3], l: in[2]};
      c      = '{h: in[1], l: in[0]};
      #1;
      if (t_star)  exp_r = 6'b111111;
      else if (t)  exp_r = in;
      else         exp_r = 6'b000000;
      checks++;
      if ({rails.x1, rails.x0, rails.y1, rails.y0, rails.c1, rails.c0} !== exp_r) begin
        failures++;
        $display("FAIL t=%b t*=%b in=%b rails=%b expected %b", t, t_star, in, rails, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
