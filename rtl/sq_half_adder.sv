// sq_half_adder: one-bit half adder, the 2:2 counter the Wallace tree uses
// for a leftover pair of bits in a column. Combinational: s = a ^ b, co = a & b.
module sq_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
