// 8x8-bit Vedic multiplier (Urdhva Tiryakbhyam): p = a * b, unsigned,
// combinational.
//
// Each operand is split into halves of 4 bits, a = {aH, aL}, b = {bH, bL}, and
// four 4x4 Vedic multipliers form the vertical and crosswise products
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH.
// Three adders of 8, 12 and 12 bits then sum them, as the design specifies:
//   t1 = q1 + (q0 >> 4)                  (8-bit adder)
//   t2 = q2 + (q3 << 4)                  (12-bit adder)
//   t3 = t1 + t2                         (12-bit adder)
//   p  = {t3, q0[3:0]}
// None of the sums can overflow its adder; an assertion checks that every
// carry-out stays 0. The ADDER parameter chooses ripple-carry (default, the
// build whose figures are reported) or Kogge-Stone adders and is passed down
// to the smaller multipliers. Which partial products go to which adder is
// this design's choice; the design fixes only the number and widths of the
// adders.
module vedic_mult8
  import vedic_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_RCA
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);

  localparam int unsigned H = 4;   // half width
  localparam int unsigned W = 12;  // width of the two wide adders

  logic [2*H-1:0] q0, q1, q2, q3;  // partial products
  logic [2*H-1:0] t1;              // q1 + upper half of q0
  logic [W-1:0]   t2, t3;
  logic           c1, c2, c3;      // adder carry-outs, always 0

  vedic_mult4 #(.ADDER(ADDER)) u_q0 (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_mult4 #(.ADDER(ADDER)) u_q1 (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q1));
  vedic_mult4 #(.ADDER(ADDER)) u_q2 (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q2));
  vedic_mult4 #(.ADDER(ADDER)) u_q3 (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q3));

  vedic_adder #(.N(2*H), .ADDER(ADDER)) u_add1 (
    .x(q1), .y({{H{1'b0}}, q0[2*H-1:H]}), .s(t1), .cout(c1)
  );
  vedic_adder #(.N(W), .ADDER(ADDER)) u_add2 (
    .x({{H{1'b0}}, q2}), .y({q3, {H{1'b0}}}), .s(t2), .cout(c2)
  );
  vedic_adder #(.N(W), .ADDER(ADDER)) u_add3 (
    .x({{H{1'b0}}, t1}), .y(t2), .s(t3), .cout(c3)
  );

  assign p = {t3, q0[H-1:0]};

  // t1 < 2**(2H), t2 < 2**(3H) and t3 = (a*b) >> H < 2**(3H): no adder overflows.
  always_comb begin
    assert (!(c1 | c2 | c3)) else $error("adder overflow in %m");
  end

endmodule : vedic_mult8
