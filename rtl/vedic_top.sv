// Top level: the 16x16-bit Vedic multiplier in both of its adder builds.
//
// The same unsigned operands a and b feed two 16x16 Urdhva Tiryakbhyam
// multipliers. p_rca comes from the build that sums partial products with
// ripple-carry adders, the configuration whose delay and area are reported;
// p_ksa comes from the build with Kogge-Stone parallel prefix adders, the
// faster alternative the design compares it with. Both hold a*b. Each is a
// tree of four 8x8, sixteen 4x4 and sixty-four 2x2 Vedic elements.
// Purely combinational: no clock, no reset, products valid one
// propagation delay after the operands. Placing both builds side by side is
// this design's choice, so that either can be used or the two compared.
module vedic_top
  import vedic_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p_rca,
  output logic [31:0] p_ksa
);

  vedic_mult16 #(.ADDER(ADDER_RCA)) u_mult_rca (.a(a), .b(b), .p(p_rca));
  vedic_mult16 #(.ADDER(ADDER_KSA)) u_mult_ksa (.a(a), .b(b), .p(p_ksa));

endmodule : vedic_top
