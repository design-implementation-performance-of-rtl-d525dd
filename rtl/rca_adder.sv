// N-bit ripple carry adder: {cout, s} = x + y + cin, combinational.
//
// N full adders in a row; the carry-out of each stage is the carry-in of the
// next more significant stage, so the carry ripples from bit 0 to bit N-1 and
// the delay grows linearly with N. The default width, 4, is the adder shown as
// the basic example; the multipliers instantiate it at 4, 6, 8, 12, 16 and 24
// bits. The carry-in port is this design's addition: the multipliers tie it to 0.
module rca_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] c;  // c[i] is the carry into stage i

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    full_adder u_fa (
      .a (x[i]),
      .b (y[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[N];

endmodule : rca_adder
