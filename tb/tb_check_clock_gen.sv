// Testbench for check_clock_gen.
// Runs many periods with data_valid changing at random and checks, cycle by
// cycle, that each output matches the period schedule: P in cycle 0, T* in
// cycle 2, T over cycles 4 .. 4+ACT-1 only if data_valid was HIGH in cycle
// 3, and Q in cycle 4+ACT-2. Also checks that P and T* never overlap T, that
// Q always falls inside an enabled T or a suppressed one, and the period
// length. Run with the default ACT_CYCLES and with a longer one.
module tb_check_clock_gen;

  logic clk = 0, rst_n = 0;
  logic dv;
  logic t4, p4, ts4, q4;
  logic t7, p7, ts7, q7;
  int   checks = 0, failures = 0;

  check_clock_gen               dut4 (.clk, .rst_n, .data_valid(dv), .t(t4), .p(p4), .t_star(ts4), .q(q4));
  check_clock_gen #(.ACT_CYCLES(7)) dut7 (.clk, .rst_n, .data_valid(dv), .t(t7), .p(p7), .t_star(ts7), .q(q7));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference schedule, kept independently of the design.
  task automatic check_one(input string nm, input int act, input int cyc, input bit en,
                           input logic t, input logic p, input logic ts, input logic q);
    int per, ph;
    bit et;
    per = 4 + act;
    ph  = cyc % per;
    et  = en && ph >= 4;
    checks++;
    if (t !== et || p !== (ph == 0) || ts !== (ph == 2) || q !== (ph == per - 2)) begin
      failures++;
      $display("FAIL %s cycle %0d phase %0d: t=%b p=%b t*=%b q=%b expected t=%b", nm, cyc, ph,
               t, p, ts, q, et);
    end
    if ((p && t) || (ts && t) || (p && ts)) begin
      failures++;
      $display("FAIL %s overlapping pulses at cycle %0d", nm, cyc);
    end
  endtask

  int  cyc;
  bit  en4, en7;
  int  t_count4;
  bit  t4_prev = 0;

  initial begin
    dv = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // The first rising edge after reset starts period 0.
    cyc = 0; en4 = 0; en7 = 0; t_count4 = 0;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk);
      #1;
      // Sample the gate decision made on this edge.
      check_one("act4", 4, cyc, en4, t4, p4, ts4, q4);
      check_one("act7", 7, cyc, en7, t7, p7, ts7, q7);
      if (t4 && !t4_prev) t_count4++;
      t4_prev = t4;
      @(negedge clk) dv = 1'($urandom_range(0, 1));
      // data_valid held over the end of phase 3 decides the next active
      // interval.
      if (cyc % 8  == 3) en4 = dv;
      if (cyc % 11 == 3) en7 = dv;
      cyc++;
    end
    checks++;
    if (t_count4 == 0 || t_count4 == 250) begin
      failures++;
      $display("FAIL data_valid never gated or never enabled T (%0d of 250)", t_count4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
