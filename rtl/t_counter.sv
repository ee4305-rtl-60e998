// Up counter of toggle flip-flops, clocked by one of the measured inputs.
//
// Bit 0 toggles on every rising edge of clk; bit i toggles when bits 0..i-1
// are all one, which is the AND gate in front of the last toggle flip-flop of
// the 3-bit original. All flip-flops share clk, so the counter is
// synchronous and counts rising edges modulo 2**WIDTH; wrap-around is
// harmless because only the difference of two counters is used.
//
// Interface: clk is the measured input signal itself; rst_n is an
// asynchronous active-low clear; q is the count. Counting on the rising edge
// and the clear are this design's own choices; the structure and the width
// of 3 follow the design.
module t_counter #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] toggle;

  // Toggle enables: T0 is tied high, Ti is the AND of all lower bits.
  assign toggle[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_toggle
    assign toggle[i] = toggle[i-1] & q[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q ^ toggle;
  end

endmodule
