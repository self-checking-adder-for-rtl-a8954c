// Testbench for fault_signalizer.
// Random fault-wire patterns and check pulses are applied cycle by cycle,
// with a power-on reset every few cycles. A reference R-S flag, written from
// the three test rules (P with a LOW first-group wire, T* with a LOW
// second-group wire, T and Q with any HIGH wire), is compared with F after
// every clock edge; NF, NS and FS are compared combinationally. Q with T
// LOW and faulty groups must not set F. Each rule
// must have set the flag on its own at least once. Also checks that a
// faultless passive/injection/active sequence never sets F, and that F
// holds once set while the checks pass.
module tb_fault_signalizer;

  localparam int NF1 = 6;
  localparam int NS1 = 24;

  logic clk = 0, rst_n = 0;
  logic t, p, t_star, q;
  logic [NF1-1:0] first;
  logic [NS1-1:0] second;
  logic nf, ns, fs, f;
  int   checks = 0, failures = 0;
  bit   f_ref;
  int   by_p = 0, by_ts = 0, by_q = 0;

  fault_signalizer #(.N_FIRST(NF1), .N_SECOND(NS1)) dut (
    .clk, .rst_n, .t, .p, .t_star, .q, .first, .second, .nf, .ns, .fs, .f);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mostly all-ones or all-zeros groups with an occasional single bad wire.
  function automatic logic [NS1-1:0] group(input int n, input bit good_high);
    logic [NS1-1:0] v;
    v = good_high ? '1 : '0;
    if ($urandom_range(0, 3) == 0) v[$urandom_range(0, n - 1)] ^= 1'b1;
    return v;
  endfunction

  task automatic step_and_check();
    bit e_nf, e_ns, e_fs, tp, tts, tq;
    #1;
    e_nf = (first != '1);
    e_ns = (second != '1);
    e_fs = (first != '0) || (second != '0);
    checks++;
    if (nf !== e_nf || ns !== e_ns || fs !== e_fs) begin
      failures++;
      $display("FAIL nf/ns/fs=%b%b%b expected %b%b%b", nf, ns, fs, e_nf, e_ns, e_fs);
    end
    tp  = p && e_nf;
    tts = t_star && e_ns;
    tq  = t && q && e_fs;
    if (!f_ref && tp && !tts && !tq) by_p++;
    if (!f_ref && tts && !tp && !tq) by_ts++;
    if (!f_ref && tq && !tp && !tts) by_q++;
    if (tp || tts || tq) f_ref = 1;
    @(posedge clk);
    #1;
    checks++;
    if (f !== f_ref) begin
      failures++;
      $display("FAIL f=%b expected %b", f, f_ref);
    end
  endtask

  initial begin
    {t, p, t_star, q} = '0;
    first = '0; second = '0;
    f_ref = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // A faultless checking sequence (one component's view) never sets F.
    for (int k = 0; k < 5; k++) begin
      {t, p, t_star, q} = 4'b0100; first = '1; second = '0; step_and_check();
      {t, p, t_star, q} = 4'b0010; first = '0; second = '1; step_and_check();
      {t, p, t_star, q} = 4'b1000; first = '0; second = '0; step_and_check();
      {t, p, t_star, q} = 4'b1001; first = '0; second = '0; step_and_check();
    end
    checks++;
    if (f !== 1'b0) begin failures++; $display("FAIL faultless sequence set F"); end

    // Random checks with periodic power-on resets.
    for (int k = 0; k < 3000; k++) begin
      int kind;
      kind = $urandom_range(0, 4);
      {t, p, t_star, q} = '0;
      case (kind)
        0: begin p = 1;                first = group(NF1, 1)[NF1-1:0]; second = group(NS1, 0); end
        1: begin t_star = 1;           first = '0; second = group(NS1, 1); end
        2: begin t = 1; q = 1'($urandom_range(0, 1));
                 first = group(NF1, 0)[NF1-1:0]; second = group(NS1, 0); end
        3: begin q = 1;                first = NF1'($urandom); second = NS1'($urandom); end
        default: begin first = NF1'($urandom); second = NS1'($urandom); end
      endcase
      step_and_check();
      if (k % 13 == 12) begin
        rst_n = 0; #1;
        checks++;
        if (f !== 1'b0) begin failures++; $display("FAIL reset did not clear F"); end
        f_ref = 0;
        @(negedge clk) rst_n = 1;
      end
    end

    checks++;
    if (by_p == 0 || by_ts == 0 || by_q == 0) begin
      failures++;
      $display("FAIL a test never set F alone: P %0d, T* %0d, TQ %0d", by_p, by_ts, by_q);
    end
    $display("set by P test %0d, T* test %0d, active test %0d", by_p, by_ts, by_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
