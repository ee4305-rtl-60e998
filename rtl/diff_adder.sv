// Difference of two counters, formed as a ripple chain of full adders.
//
// Each bit of counter B is inverted and added to the same bit of counter A.
// The carry into the least significant cell is 0, so the result is
// A + ~B = A - B - 1 modulo 2**WIDTH: equal counts give all ones. Overflow is
// ignored, since any WIDTH-bit result is a valid difference; the carry out of
// the top cell is still brought out (it is 1 exactly when A > B).
//
// Interface: cnt_a, cnt_b the two counts; diff the WIDTH-bit result; co the
// carry out. Purely combinational. The inverters, the full-adder chain, the
// unused carry-in of the first cell and the carry output follow the design;
// the WIDTH parameter is this design's own.
module diff_adder #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] cnt_a,
  input  logic [WIDTH-1:0] cnt_b,
  output logic [WIDTH-1:0] diff,
  output logic             co
);

  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    full_adder u_fa (
      .a   (cnt_a[i]),
      .b   (~cnt_b[i]),
      .ci  (carry[i]),
      .sum (diff[i]),
      .co  (carry[i+1])
    );
  end

  assign co = carry[WIDTH];

endmodule
