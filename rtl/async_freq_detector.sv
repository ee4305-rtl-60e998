// Asynchronous frequency detector with its LED outputs.
//
// The state machine async_fd_core raises fast while input B runs faster than
// input A and slow while it runs slower. Those levels only last until the
// next input edge, too short to see on a LED, so two set-reset flip-flops
// hold the last indication: fof is set by fast and reset by slow, sof is set
// by slow and reset by fast. All four outputs are meant for LEDs.
//
// Interface: a, b inputs (one change at a time); fa, sl the direct Fast and
// Slow outputs; fof, sof the held ones. There is no clock and no reset: the
// circuit starts up on its own, and the flip-flops settle on the first Fast or
// Slow indication. This structure follows the design. The combinational
// loops that tools report here (f, g, h and the two flip-flops) are the
// storage of this asynchronous circuit and are intended.
module async_freq_detector
  import freq_det_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic fa,
  output logic sl,
  output logic fof,
  output logic sof,
  output fgh_t fgh
);

  async_fd_core u_core (
    .a    (a),
    .b    (b),
    .fast (fa),
    .slow (sl),
    .fgh  (fgh)
  );

  sr_latch u_fof (.set(fa), .rst(sl), .q(fof));
  sr_latch u_sof (.set(sl), .rst(fa), .q(sof));

endmodule
