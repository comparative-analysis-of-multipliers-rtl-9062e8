// full_adder: one-bit full adder, the cell from which the ripple-carry
// adder, the carry-save row and the unit adder are built.
// Purely combinational: sum = a ^ b ^ ci, co = majority(a, b, ci).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
