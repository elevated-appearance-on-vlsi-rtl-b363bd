// sq_full_adder: one-bit full adder, the 3:2 counter of the Wallace tree.
// Purely combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
// The sum stays in the column of its inputs, the carry moves one column up.
module sq_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
