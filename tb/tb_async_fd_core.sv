// Testbench of async_fd_core.
//
// 1. Start-up: the feedback variables are forced to each of the eight codes,
//    released with the inputs at AB=10, and the synchronising input sequence
//    10, 11, 01, 00 must bring the circuit to state 1 (code 001).
// 2. The 17-step input sequence of the original test vectors (states
//    9,2,3,4,1,2,7,2,7,2,3,5,10,4,1,6,9) with its expected f,g,h and Fast,
//    Slow values.
// 3. A random walk of single input changes, compared after each change with
//    a reference model that walks the primitive flow table. Every one of the
//    ten primitive states must be visited.
// Inputs change one at a time and outputs are sampled 1 ns later (the logic
// has no delay, so it has settled by then).
module tb_async_fd_core;
  timeunit 1ns;
  timeprecision 1ps;
  import freq_det_pkg::*;
  import fd_ref_pkg::*;

  logic a = 1'b0, b = 1'b0;
  logic fast, slow;
  fgh_t fgh;

  int checks = 0, failures = 0;
  int visits[1:10];

  async_fd_core dut (.a(a), .b(b), .fast(fast), .slow(slow), .fgh(fgh));

  task automatic apply(logic na, logic nb);
    if (na != a && nb != b) begin
      // Two changes at once are outside fundamental mode: split them.
      a = na; #1;
    end
    a = na; b = nb; #1;
  endtask

  task automatic expect_out(string what, logic [2:0] code, logic ef, logic es);
    checks++;
    if (fgh !== code || fast !== ef || slow !== es) begin
      failures++;
      $display("FAIL %s: fgh=%b fast=%b slow=%b, expected %b %b %b",
               what, fgh, fast, slow, code, ef, es);
    end
  endtask

  // Test vectors: {A, B, F, G, H, Fast, Slow}
  localparam logic [6:0] VEC[17] = '{
    7'b00_000_01, 7'b01_011_00, 7'b11_101_00, 7'b10_100_00,
    7'b00_001_00, 7'b01_011_00, 7'b00_011_10, 7'b01_011_00,
    7'b00_011_10, 7'b01_011_00, 7'b11_101_00, 7'b01_111_00,
    7'b11_111_01, 7'b10_100_00, 7'b00_001_00, 7'b10_000_00,
    7'b00_000_01
  };

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, ns;
    logic na, nb;
    foreach (visits[i]) visits[i] = 0;
    #1;

    // 1. Start-up from every feedback code.
    for (int code = 0; code < 8; code++) begin
      a = 1'b1; b = 1'b0;
      force dut.f = code[2];
      force dut.g = code[1];
      force dut.h = code[0];
      #1;
      checks++;
      if (fgh !== code[2:0]) begin
        failures++;
        $display("FAIL could not force feedback code %03b", code);
      end
      release dut.f;
      release dut.g;
      release dut.h;
      #1;
      apply(1, 0);
      apply(1, 1);
      apply(0, 1);
      apply(0, 0);
      expect_out($sformatf("start-up from %03b", code), 3'b001, 1'b0, 1'b0);
    end

    // 2. Test vectors, entered from state 1 via 10 (state 6).
    apply(1, 0);
    foreach (VEC[i]) begin
      apply(VEC[i][6], VEC[i][5]);
      expect_out($sformatf("vector %0d", i), VEC[i][4:2], VEC[i][1], VEC[i][0]);
    end

    // 3. Random walk, one input change at a time, from state 9.
    s = 9;
    for (int step = 0; step < 4000; step++) begin
      na = a; nb = b;
      if (($urandom % 2) == 0) na = ~a; else nb = ~b;
      apply(na, nb);
      ns = next_state(s, na, nb);
      s = ns;
      visits[s]++;
      expect_out($sformatf("walk step %0d state %0d", step, s), row_of(s), fast_of(s), slow_of(s));
    end

    for (int i = 1; i <= 10; i++) begin
      checks++;
      if (visits[i] == 0) begin
        failures++;
        $display("FAIL state %0d never visited", i);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
