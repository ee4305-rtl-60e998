// Testbench of sr_latch: drives set and rst with random values (with runs of
// both low so that holding is exercised) and compares q with the expected
// value q' = set | (q & ~rst) after every change; counts how often the latch
// was set, reset and held each value.
module tb_sr_latch;
  timeunit 1ns;
  timeprecision 1ps;

  logic set = 1'b0, rst = 1'b1;
  logic q;
  logic exp_q;
  int checks = 0, failures = 0;
  int n_set = 0, n_rst = 0, n_hold1 = 0, n_hold0 = 0;

  sr_latch dut (.set(set), .rst(rst), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    exp_q = 1'b0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL initial reset"); end
    for (int i = 0; i < 2000; i++) begin
      case ($urandom % 4)
        0: begin set = 1'b1; rst = 1'b0; end
        1: begin set = 1'b0; rst = 1'b1; end
        2: begin set = 1'b1; rst = 1'b1; end
        default: begin set = 1'b0; rst = 1'b0; end
      endcase
      #1;
      if (set) n_set++;
      else if (rst) n_rst++;
      else if (exp_q) n_hold1++;
      else n_hold0++;
      exp_q = set | (exp_q & ~rst);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL step %0d set=%b rst=%b q=%b expected %b", i, set, rst, q, exp_q);
      end
    end
    checks++;
    if (n_set == 0 || n_rst == 0 || n_hold1 == 0 || n_hold0 == 0) begin
      failures++;
      $display("FAIL not every case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
