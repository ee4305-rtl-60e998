// Combined frequency detector: both realisations on the same two inputs.
//
// Inputs a and b feed the asynchronous flow-table detector (outputs fa, sl
// and the held fof, sof) and the counter-difference detector (8 LEDs led and
// the adder carry co) at the same time, as in the combined single-device
// arrangement, which needs ten LEDs (plus the held outputs here). Input b is
// "B" of the asynchronous detector and "F2" of the counter detector, input a
// is "A" and "F1".
//
// rst_n clears only the counters of the counter detector; the asynchronous
// detector needs no reset. No clock: everything is driven by the edges of a
// and b. Tools report combinational loops inside the asynchronous detector:
// they are its state storage and are intended. Sharing the inputs and the
// extra held outputs follow the combined arrangement described for the
// design; the clear input and the fgh/diff/co observation ports are this
// design's own.
module freq_detector_top
  import freq_det_pkg::*;
#(
  parameter int unsigned WIDTH = CNT_WIDTH
) (
  input  logic                a,
  input  logic                b,
  input  logic                rst_n,
  output logic                fa,
  output logic                sl,
  output logic                fof,
  output logic                sof,
  output fgh_t                fgh,
  output logic [2**WIDTH-1:0] led,
  output logic [WIDTH-1:0]    diff,
  output logic                co
);

  async_freq_detector u_async (
    .a   (a),
    .b   (b),
    .fa  (fa),
    .sl  (sl),
    .fof (fof),
    .sof (sof),
    .fgh (fgh)
  );

  sync_freq_detector #(.WIDTH(WIDTH)) u_sync (
    .a     (a),
    .b     (b),
    .rst_n (rst_n),
    .led   (led),
    .diff  (diff),
    .co    (co)
  );

endmodule
