// Reference model of the asynchronous frequency detector for the testbenches.
//
// It walks the primitive flow table (ten states) directly, independent of the
// minimised equations of the RTL: next_state() gives the stable state reached
// after one input change, row_of() the feedback code the state is assigned
// to, and fast_of()/slow_of() the outputs of each stable state.
package fd_ref_pkg;

  // Stable primitive state reached from state s after the inputs become {a,b}.
  // Returns 0 for an input change the flow table does not allow.
  function automatic int next_state(int s, logic a, logic b);
    case ({a, b})
      2'b00: case (s) 1, 4, 5: return 1;  2, 7: return 7;  6, 9: return 9;  default: return 0; endcase
      2'b01: case (s) 1, 2, 7, 9: return 2;  3, 5, 8, 10: return 5;  default: return 0; endcase
      2'b11: case (s) 2, 3, 6: return 3;  4, 8: return 8;  5, 10: return 10;  default: return 0; endcase
      2'b10: case (s) 1, 6, 7, 9: return 6;  3, 4, 8, 10: return 4;  default: return 0; endcase
      default: return 0;
    endcase
  endfunction

  // Feedback code {f,g,h} of each primitive state.
  function automatic logic [2:0] row_of(int s);
    case (s)
      1:       return 3'b001;
      2, 7:    return 3'b011;
      3:       return 3'b101;
      4, 8:    return 3'b100;
      5, 10:   return 3'b111;
      default: return 3'b000;  // 6, 9
    endcase
  endfunction

  function automatic logic fast_of(int s);
    return (s == 7) || (s == 8);
  endfunction

  function automatic logic slow_of(int s);
    return (s == 9) || (s == 10);
  endfunction

endpackage
