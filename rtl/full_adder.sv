// 1-bit full adder: sum and carry of three input bits. Purely combinational.
// It is the cell the ripple-carry adder chains together. The equations are the
// textbook ones: s = a xor b xor ci, co = majority(a, b, ci).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);

endmodule : full_adder
