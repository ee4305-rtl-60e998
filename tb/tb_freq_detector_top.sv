// End-to-end testbench of freq_detector_top with all parameters at their
// defaults.
//
// The two inputs carry square waves in six phases, as on a bench: equal
// frequencies with b lagging a, equal frequencies with a lagging b, b twice
// as fast as a, a held low while b runs (DC against a frequency), a three
// times as fast as b, and b held low while a runs. Inputs never change at the
// same instant (the asynchronous detector works in fundamental mode).
//
// After every input change both detectors are compared with independent
// models: the flow-table walker of fd_ref_pkg with set-reset models for fof
// and sof, and edge counts of a and b for the LED row, the difference and
// the carry. At the end of each phase the held outputs must show the faster
// input. Every mechanism must occur at least once: both equal-frequency
// state cycles (1-2-3-4 and 1-6-3-5), each of the Fast states 7, 8 and Slow
// states 9, 10, setting of fof and of sof, the LED row walking down and up,
// wrap-around of both counters and both values of the carry.
module tb_freq_detector_top;
  timeunit 1ns;
  timeprecision 1ps;
  import freq_det_pkg::*;
  import fd_ref_pkg::*;

  logic a = 1'b0, b = 1'b0, rst_n = 1'b1;
  logic fa, sl, fof, sof, co;
  fgh_t fgh;
  logic [7:0] led;
  logic [2:0] diff;

  int checks = 0, failures = 0;
  int s, prev_s;
  logic exp_fof, exp_sof;
  int na = 0, nb = 0;

  // Mechanism counters.
  int n_cycle_1234 = 0, n_cycle_1635 = 0;
  int visits[1:10];
  int n_fof_set = 0, n_sof_set = 0;
  int moves_down = 0, moves_up = 0, wraps_a = 0, wraps_b = 0, n_co1 = 0, n_co0 = 0;

  freq_detector_top dut (
    .a(a), .b(b), .rst_n(rst_n),
    .fa(fa), .sl(sl), .fof(fof), .sof(sof), .fgh(fgh),
    .led(led), .diff(diff), .co(co)
  );

  task automatic check_all(string what);
    logic [2:0] d;
    d = 3'(3'(na) - 3'(nb) - 3'd1);
    checks++;
    if (fgh !== row_of(s) || fa !== fast_of(s) || sl !== slow_of(s) ||
        fof !== exp_fof || sof !== exp_sof) begin
      failures++;
      $display("FAIL %s async (state %0d): fgh=%b fa=%b sl=%b fof=%b sof=%b", what, s,
               fgh, fa, sl, fof, sof);
    end
    checks++;
    if (diff !== d || led !== (8'b1 << d) || co !== (3'(unsigned'(na)) > 3'(unsigned'(nb)))) begin
      failures++;
      $display("FAIL %s counters: diff=%0d led=%b co=%b expected %0d", what, diff, led, co, d);
    end
    if (co) n_co1++; else n_co0++;
  endtask

  // One input change with all reference models updated.
  task automatic step(logic new_a, logic new_b, string what);
    logic [2:0] old_diff;
    old_diff = diff;
    if (new_a && !a) begin na++; if (na % 8 == 0) wraps_a++; end
    if (new_b && !b) begin nb++; if (nb % 8 == 0) wraps_b++; end
    a = new_a; b = new_b;
    #1;
    prev_s = s;
    s = next_state(s, new_a, new_b);
    visits[s]++;
    if (prev_s == 1 && s == 2) n_cycle_1234++;
    if (prev_s == 1 && s == 6) n_cycle_1635++;
    if (fast_of(s) && !exp_fof) n_fof_set++;
    if (slow_of(s) && !exp_sof) n_sof_set++;
    exp_fof = fast_of(s) | (exp_fof & ~slow_of(s));
    exp_sof = slow_of(s) | (exp_sof & ~fast_of(s));
    if (diff == 3'(old_diff - 3'd1)) moves_down++;
    if (diff == 3'(old_diff + 3'd1)) moves_up++;
    check_all(what);
  endtask

  // Square waves for n ns: half periods ha, hb (0 = held at its level),
  // b's edges delayed by ob ns.
  task automatic run_waves(int ha, int hb, int ob, int n, string what);
    for (int t = 1; t <= n; t++) begin
      bit ea, eb;
      ea = (ha != 0) && (t % ha == 0);
      eb = (hb != 0) && (t >= ob) && ((t - ob) % hb == 0);
      if (ea) step(~a, b, what);
      if (eb) step(a, ~b, what);
      if (!ea && !eb) #1;
    end
  endtask

  task automatic expect_held(logic ef, logic es, string what);
    checks++;
    if (fof !== ef || sof !== es) begin
      failures++;
      $display("FAIL end of %s: fof=%b sof=%b expected %b %b", what, fof, sof, ef, es);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (visits[i]) visits[i] = 0;
    #1;
    rst_n = 1'b0; #1;
    // Synchronise the asynchronous detector (10, 11, 01, 00 -> state 1)
    // while the counters are held clear, then go 1 -> 6 -> 9 (Slow).
    a = 1; #1; b = 1; #1; a = 0; #1; b = 0; #1;
    a = 1; #1; a = 0; #1;
    s = 9;
    exp_fof = 1'b0; exp_sof = 1'b1;
    rst_n = 1'b1; #1;
    check_all("after start");

    run_waves(10, 10, 5, 400, "equal, b lags");
    run_waves(10, 10, 15, 400, "equal, a lags");
    run_waves(20, 10, 3, 600, "b twice as fast");
    expect_held(1'b1, 1'b0, "b twice as fast");
    run_waves(0, 10, 3, 300, "a held, b running");
    expect_held(1'b1, 1'b0, "a held, b running");
    run_waves(10, 30, 4, 900, "a three times as fast");
    expect_held(1'b0, 1'b1, "a three times as fast");
    if (b) step(a, 1'b0, "release b");
    run_waves(10, 0, 0, 300, "b held, a running");
    expect_held(1'b0, 1'b1, "b held, a running");

    $display("mechanisms: cycle1234=%0d cycle1635=%0d fof_set=%0d sof_set=%0d",
             n_cycle_1234, n_cycle_1635, n_fof_set, n_sof_set);
    $display("mechanisms: led_down=%0d led_up=%0d wrap_a=%0d wrap_b=%0d co1=%0d co0=%0d",
             moves_down, moves_up, wraps_a, wraps_b, n_co1, n_co0);
    for (int i = 1; i <= 10; i++) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("FAIL state %0d never reached", i); end
    end
    checks++;
    if (n_cycle_1234 == 0 || n_cycle_1635 == 0 || n_fof_set == 0 || n_sof_set == 0 ||
        moves_down == 0 || moves_up == 0 || wraps_a == 0 || wraps_b == 0 ||
        n_co1 == 0 || n_co0 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
