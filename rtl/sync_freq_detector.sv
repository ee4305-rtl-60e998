// Counter-difference frequency detector.
//
// Each input is the clock of its own counter, so after some time counter A
// holds the number of rising edges of input A and counter B those of input
// B, both modulo 2**WIDTH. An adder forms A - B - 1 and a decoder lights one
// of 2**WIDTH LEDs for that value. With equal frequencies the lit LED stays
// in place: the top LED while the counts are equal, and between an edge of
// one input and the matching edge of the other the LED below it (B leading)
// or LED 0 (A leading). If A is faster the lit LED walks upwards, if B is
// faster it walks downwards, wrapping around. The speed of the walk is the frequency
// difference; when the difference is very large the LEDs change too fast to
// follow.
//
// Interface: a, b the two measured signals; rst_n an asynchronous active-low
// clear of both counters; led the one-hot LED row; diff the difference
// value; co the carry out of the adder (A count above B count). The outputs
// are combinational from the two counters and can glitch when edges of A and
// B fall close together. The structure and the 3-bit / 8-LED size follow the
// design; the clear is this design's own addition.
module sync_freq_detector
  import freq_det_pkg::*;
#(
  parameter int unsigned WIDTH = CNT_WIDTH
) (
  input  logic                a,
  input  logic                b,
  input  logic                rst_n,
  output logic [2**WIDTH-1:0] led,
  output logic [WIDTH-1:0]    diff,
  output logic                co
);

  logic [WIDTH-1:0] cnt_a, cnt_b;

  t_counter #(.WIDTH(WIDTH)) u_cnt_a (.clk(a), .rst_n(rst_n), .q(cnt_a));
  t_counter #(.WIDTH(WIDTH)) u_cnt_b (.clk(b), .rst_n(rst_n), .q(cnt_b));

  diff_adder #(.WIDTH(WIDTH)) u_add (
    .cnt_a (cnt_a),
    .cnt_b (cnt_b),
    .diff  (diff),
    .co    (co)
  );

  oct_demux #(.WIDTH(WIDTH)) u_demux (.sel(diff), .led(led));

endmodule
