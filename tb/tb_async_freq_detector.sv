// Testbench of async_freq_detector.
//
// After a synchronising input sequence the detector is driven from state 1
// into state 9 (Slow), which sets sof and clears fof. Then square waves are
// applied in three phases: equal frequencies, B at twice the frequency of A,
// and A at twice the frequency of B. After every input change the direct
// outputs fa, sl and the feedback code are compared with a reference model
// that walks the primitive flow table, and fof, sof with a set-reset model.
// At the end of the "B faster" phase fof must be lit, at the end of the
// "A faster" phase sof. Inputs never change at the same instant.
module tb_async_freq_detector;
  timeunit 1ns;
  timeprecision 1ps;
  import freq_det_pkg::*;
  import fd_ref_pkg::*;

  logic a = 1'b0, b = 1'b0;
  logic fa, sl, fof, sof;
  fgh_t fgh;

  int checks = 0, failures = 0;
  int s;
  logic exp_fof, exp_sof;
  int n_fof_set = 0, n_sof_set = 0;

  async_freq_detector dut (
    .a(a), .b(b), .fa(fa), .sl(sl), .fof(fof), .sof(sof), .fgh(fgh)
  );

  task automatic check_all(string what);
    checks++;
    if (fgh !== row_of(s) || fa !== fast_of(s) || sl !== slow_of(s) ||
        fof !== exp_fof || sof !== exp_sof) begin
      failures++;
      $display("FAIL %s (state %0d): fgh=%b fa=%b sl=%b fof=%b sof=%b expected %b %b %b %b %b",
               what, s, fgh, fa, sl, fof, sof, row_of(s), fast_of(s), slow_of(s),
               exp_fof, exp_sof);
    end
  endtask

  // One input change; updates the reference models and checks.
  task automatic step(logic na, logic nb, string what);
    a = na; b = nb;
    #1;
    s = next_state(s, na, nb);
    if (fast_of(s) && !exp_fof) n_fof_set++;
    if (slow_of(s) && !exp_sof) n_sof_set++;
    exp_fof = fast_of(s) | (exp_fof & ~slow_of(s));
    exp_sof = slow_of(s) | (exp_sof & ~fast_of(s));
    check_all(what);
  endtask

  // Square waves with half periods ha and hb (ns) for n ns of time.
  task automatic run_waves(int ha, int hb, int n, string what);
    for (int t = 1; t <= n; t++) begin
      if (t % ha == 0) step(~a, b, what);
      if (t % hb == 0) step(a, ~b, what);
      if ((t % ha != 0) && (t % hb != 0)) #1;
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    // Synchronise: 10, 11, 01, 00 ends in state 1 from any start.
    a = 1; b = 0; #1; a = 1; b = 1; #1; a = 0; b = 1; #1; a = 0; b = 0; #1;
    s = 1;
    // 1 -> 6 -> 9: Slow sets sof and resets fof.
    a = 1; #1; s = 6;
    a = 0; #1; s = 9;
    exp_fof = 1'b0; exp_sof = 1'b1;
    check_all("enter state 9");

    run_waves(10, 10, 200, "equal");       // b follows a by a fixed phase
    run_waves(20, 10, 400, "B faster");
    checks++;
    if (fof !== 1'b1 || sof !== 1'b0) begin
      failures++;
      $display("FAIL fof not lit after B faster");
    end
    run_waves(7, 14, 400, "A faster");
    checks++;
    if (sof !== 1'b1 || fof !== 1'b0) begin
      failures++;
      $display("FAIL sof not lit after A faster");
    end
    checks++;
    if (n_fof_set == 0 || n_sof_set == 0) begin
      failures++;
      $display("FAIL a held output was never set (fof %0d, sof %0d)", n_fof_set, n_sof_set);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
