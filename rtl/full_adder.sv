// One-bit full adder cell: sum = a ^ b ^ ci, co = majority(a, b, ci).
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);

  assign sum = a ^ b ^ ci;
  assign co  = (a & b) | (a & ci) | (b & ci);

endmodule
