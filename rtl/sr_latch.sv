// Set-reset flip-flop built from a single feedback gate, used to hold the
// short Fast and Slow pulses of the asynchronous detector long enough to be
// seen on a LED.
//
// Function: q = set | (q & ~rst). Set wins when both inputs are high. There
// is no clock; q follows the inputs after the gate delay. The equation is the
// one of the design (FOF is set by Fast and reset by Slow, SOF the other way
// round); packaging it as a reusable module is this design's own choice.
// The combinational loop from q back to its own input is the storage of the
// latch and is intended.
module sr_latch (
  input  logic set,
  input  logic rst,
  output logic q
);

  assign q = set | (q & ~rst);

endmodule
