// Shared types and constants of the two frequency detectors.
//
// The asynchronous detector keeps its state in three feedback variables
// f, g and h. Six of the eight codes are rows of its merged flow table; each
// row holds one or two of the ten primitive states. The row codes below are
// the ones of the detector's transition matrix. Codes 3'b010 and 3'b110 are
// unused rows that the logic leaves on its own after power-up (except for
// row 010 with both inputs low, see async_fd_core).
//
// The synchronous detector counts input edges in CNT_WIDTH-bit counters and
// shows their difference on 2**CNT_WIDTH LEDs; 3 bits and 8 LEDs are the
// numbers of the design.
package freq_det_pkg;

  // Feedback variables of the asynchronous detector, f the most significant.
  typedef struct packed {
    logic f;
    logic g;
    logic h;
  } fgh_t;

  // Rows of the merged flow table (primitive states they hold).
  localparam logic [2:0] ROW_9_6  = 3'b000;  // 9 (AB=00, Slow), 6 (AB=10)
  localparam logic [2:0] ROW_1    = 3'b001;  // 1 (AB=00)
  localparam logic [2:0] ROW_7_2  = 3'b011;  // 7 (AB=00, Fast), 2 (AB=01)
  localparam logic [2:0] ROW_8_4  = 3'b100;  // 8 (AB=11, Fast), 4 (AB=10)
  localparam logic [2:0] ROW_3    = 3'b101;  // 3 (AB=11)
  localparam logic [2:0] ROW_5_10 = 3'b111;  // 5 (AB=01), 10 (AB=11, Slow)

  // Width of the synchronous detector's counters and adder.
  localparam int unsigned CNT_WIDTH = 3;

endpackage
