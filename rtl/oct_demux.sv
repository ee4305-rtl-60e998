// 3-to-8 demultiplexer (one-hot decoder) for the LED row.
//
// Output led[k] is high exactly when the input value sel equals k; one LED
// is always lit. Purely combinational. The truth table follows the design;
// the WIDTH parameter (2**WIDTH outputs, default 3 -> 8) is this design's own.
module oct_demux #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0]      sel,
  output logic [2**WIDTH-1:0]   led
);

  always_comb begin
    led = '0;
    led[sel] = 1'b1;
  end

endmodule
