// Testbench of sync_freq_detector at its default size (3-bit counters, 8
// LEDs).
//
// Clears the counters, then applies square waves on a and b in three phases
// like a bench test: equal frequencies, b twice as fast, a twice as fast.
// After every input change led, diff and co are compared with values worked
// out from the number of rising edges seen on each input:
// diff = (edges_a - edges_b - 1) mod 8, led one-hot at diff, co = (count_a >
// count_b). Also checked: while b is faster the lit LED moves down (to the
// next lower number, wrapping), while a is faster it moves up; both
// counters wrap; co takes both values.
module tb_sync_freq_detector;
  timeunit 1ns;
  timeprecision 1ps;

  logic a = 1'b0, b = 1'b0, rst_n = 1'b1;
  logic [7:0] led;
  logic [2:0] diff;
  logic co;

  int checks = 0, failures = 0;
  int na = 0, nb = 0;                 // rising edges seen
  int moves_down = 0, moves_up = 0, wraps_a = 0, wraps_b = 0, n_co1 = 0, n_co0 = 0;
  logic [2:0] prev_diff;

  sync_freq_detector dut (
    .a(a), .b(b), .rst_n(rst_n), .led(led), .diff(diff), .co(co)
  );

  task automatic check(string what);
    logic [2:0] ca, cb, d;
    ca = 3'(na); cb = 3'(nb);
    d = 3'(ca - cb - 3'd1);
    checks++;
    if (diff !== d || led !== (8'b1 << d) || co !== (ca > cb)) begin
      failures++;
      $display("FAIL %s: diff=%0d led=%b co=%b, expected %0d %b %b",
               what, diff, led, co, d, 8'b1 << d, ca > cb);
    end
    if (co) n_co1++; else n_co0++;
  endtask

  task automatic toggle_a(string what);
    a = ~a; #1;
    if (a) begin
      na++;
      if (na % 8 == 0) wraps_a++;
    end
    check(what);
  endtask

  task automatic toggle_b(string what);
    b = ~b; #1;
    if (b) begin
      nb++;
      if (nb % 8 == 0) wraps_b++;
    end
    check(what);
  endtask

  // Square waves with half periods ha, hb for n ns; counts LED steps.
  task automatic run_waves(int ha, int hb, int n, string what);
    for (int t = 1; t <= n; t++) begin
      prev_diff = diff;
      if (t % ha == 0) toggle_a(what);
      if (t % hb == 0) toggle_b(what);
      if ((t % ha != 0) && (t % hb != 0)) #1;
      if (diff == 3'(prev_diff - 3'd1)) moves_down++;
      if (diff == 3'(prev_diff + 3'd1)) moves_up++;
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
    int down0, up0;
    #1;
    rst_n = 1'b0; #1;
    check("after clear");
    rst_n = 1'b1; #1;

    run_waves(10, 10, 300, "equal");
    // Equal frequencies: the lit LED stays at LED 7 or 6.
    checks++;
    if (!(led[7] || led[6])) begin failures++; $display("FAIL equal: led=%b", led); end

    down0 = moves_down; up0 = moves_up;
    run_waves(20, 10, 400, "b faster");
    checks++;
    if (moves_down - down0 <= moves_up - up0) begin
      failures++;
      $display("FAIL b faster: LED did not walk down");
    end

    down0 = moves_down; up0 = moves_up;
    run_waves(10, 20, 400, "a faster");
    checks++;
    if (moves_up - up0 <= moves_down - down0) begin
      failures++;
      $display("FAIL a faster: LED did not walk up");
    end

    checks++;
    if (wraps_a == 0 || wraps_b == 0 || n_co1 == 0 || n_co0 == 0) begin
      failures++;
      $display("FAIL not every case exercised: wraps %0d %0d co1 %0d co0 %0d",
               wraps_a, wraps_b, n_co1, n_co0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
