// Testbench of t_counter at its default width: clears it, applies random
// numbers of rising edges on clk and compares q with an independent count
// modulo 2**WIDTH after every edge; applies the asynchronous clear in the
// middle of a count and checks that it takes effect without an edge. The
// counter must wrap around at least twice.
module tb_t_counter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 3;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [WIDTH-1:0] q;
  int checks = 0, failures = 0;
  int count = 0, wraps = 0;

  t_counter dut (.clk(clk), .rst_n(rst_n), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== WIDTH'(unsigned'(count))) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, WIDTH'(unsigned'(count)));
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
    rst_n = 1'b0; #1;
    check("after clear");
    rst_n = 1'b1; #1;
    for (int i = 0; i < 100; i++) begin
      clk = 1'b1; #1;
      count = (count + 1) % (2 ** WIDTH);
      if (count == 0) wraps++;
      check($sformatf("edge %0d", i));
      clk = 1'b0; #1;
      check($sformatf("falling edge %0d", i));
      if (i == 50) begin
        rst_n = 1'b0; #1;
        count = 0;
        check("asynchronous clear");
        rst_n = 1'b1; #1;
      end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL counter wrapped %0d times", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
