// Asynchronous sequential frequency detector (fundamental mode).
//
// The circuit has no clock. Its state is held in three feedback variables
// f, g, h that are fed back combinationally from the next-state logic, as
// in the original programmable-logic realisation. Each change of input A or
// B moves it along a flow graph of ten primitive states: with A and B at the
// same frequency it cycles 1-2-3-4 (AB = 00,01,11,10) or 1-6-3-5
// (AB = 00,10,11,01). If B makes two edges without an edge of A in between
// it lands in state 7 (A=0) or 8 (A=1) and raises Fast; if A does, it lands
// in 9 (A=0) or 10 (A=1) and raises Slow.
//
// Next-state equations (the minimised sums of products of the design):
//   F = A B g' h + (A + B + g + h') f
//   G = A' B + B f g + A' f' g
//   H = B f' + A' f + A' f' h + B f h
// Outputs, in the glitch-free form that also depends on f:
//   Fast = B' f' g + B f h'
//   Slow = A' f' h' + A f g
// The row codes (see freq_det_pkg) are arranged so that no transition has a
// critical race; from row 000 with AB=11 the circuit passes 000 -> 001 -> 101
// to reach state 3 and not states 8 or 10. Unused rows 010 and 110 lead out
// to used rows for all but AB=00 in row 010, which is left on the next input
// change, so the circuit starts up by itself and needs no reset.
//
// Interface: a, b are the two inputs and may change at any time, one at a
// time, each change after the previous one has settled (fundamental mode).
// fast and slow are level outputs; fgh shows the feedback variables.
//
// The combinational loop through f, g and h is the state memory of this
// circuit and is intended; tools report it as a combinational loop. The
// equations, the state assignment and the output equations follow the
// design; the port names and the fgh debug output are this design's own.
module async_fd_core
  import freq_det_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic fast,
  output logic slow,
  output fgh_t fgh
);

  logic f, g, h;

  // Next-state logic fed straight back: these nets are the state.
  assign f = (a & b & ~g & h) | ((a | b | g | ~h) & f);
  assign g = (~a & b) | (b & f & g) | (~a & ~f & g);
  assign h = (b & ~f) | (~a & f) | (~a & ~f & h) | (b & f & h);

  assign fast = (~b & ~f & g) | (b & f & ~h);
  assign slow = (~a & ~f & ~h) | (a & f & g);

  assign fgh = '{f: f, g: g, h: h};

endmodule
