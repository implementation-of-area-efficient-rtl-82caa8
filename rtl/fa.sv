// fa: one-bit full adder, the cell every carry save row and every final
// carry-propagate adder in this design is built from.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational.
module fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);

endmodule
