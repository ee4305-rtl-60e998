// Testbench of diff_adder at its default width: applies all pairs of counts
// and compares diff with (A - B - 1) mod 2**WIDTH and co with "A > B".
module tb_diff_adder;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 3;

  logic [WIDTH-1:0] cnt_a, cnt_b, diff;
  logic co;
  int checks = 0, failures = 0;
  int n_co = 0;

  diff_adder dut (.cnt_a(cnt_a), .cnt_b(cnt_b), .diff(diff), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** WIDTH; i++) begin
      for (int j = 0; j < 2 ** WIDTH; j++) begin
        cnt_a = WIDTH'(i);
        cnt_b = WIDTH'(j);
        #1;
        checks++;
        if (diff !== WIDTH'(i - j - 1) || co !== (i > j)) begin
          failures++;
          $display("FAIL A=%0d B=%0d: diff=%0d co=%b, expected %0d %b",
                   i, j, diff, co, WIDTH'(i - j - 1), i > j);
        end
        if (co) n_co++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
