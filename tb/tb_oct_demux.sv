// Testbench of oct_demux: for every input value exactly the output of that
// number must be high (the 3-to-8 truth table).
module tb_oct_demux;
  timeunit 1ns;
  timeprecision 1ps;

  logic [2:0] sel;
  logic [7:0] led;
  int checks = 0, failures = 0;

  oct_demux dut (.sel(sel), .led(led));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      sel = 3'(k);
      #1;
      for (int m = 0; m < 8; m++) begin
        checks++;
        if (led[m] !== (m == k)) begin
          failures++;
          $display("FAIL sel=%0d: led[%0d]=%b", k, m, led[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
