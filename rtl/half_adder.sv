// 1-bit half adder: s = a xor b, c = a and b. Purely combinational.
// Two of these, with four AND gates, make the 2x2 Vedic multiplier. The
// gate-level equations are the textbook ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule : half_adder
