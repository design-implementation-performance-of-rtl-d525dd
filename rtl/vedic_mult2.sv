// 2x2-bit Vedic multiplier, the basic element of the Urdhva Tiryakbhyam
// ("vertically and crosswise") scheme: p = a * b, unsigned, combinational.
//
// Four AND gates form the partial products. The vertical product a0b0 is p[0];
// the two crosswise products a1b0 and a0b1 go into the first half adder, whose
// sum is p[1]; the vertical product a1b1 and that carry go into the second half
// adder, which gives p[2] and p[3]. The gate count (two half adders, four AND
// gates) is the design's; the wiring is the standard one for this element.
module vedic_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a0b0, a1b0, a0b1, a1b1;  // partial products
  logic c1;                      // carry of the crosswise column

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  assign p[0] = a0b0;

  half_adder u_ha1 (.a(a1b0), .b(a0b1), .s(p[1]), .c(c1));
  half_adder u_ha2 (.a(a1b1), .b(c1),   .s(p[2]), .c(p[3]));

endmodule : vedic_mult2
