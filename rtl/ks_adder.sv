// N-bit Kogge-Stone parallel prefix adder: {cout, s} = x + y + cin,
// combinational, with carries formed in ceil(log2 N) prefix levels.
//
// Three stages, as in the design:
//   pre-processing   p[i] = x[i] xor y[i], g[i] = x[i] and y[i]
//   prefix network   level k (span d = 2**k) combines every node i >= d with
//                    node i-d:  G = G[i] or (P[i] and G[i-d]),
//                               P = P[i] and P[i-d];
//                    nodes below d pass through. After the last level node i
//                    holds the group generate/propagate of bits i..0.
//   post-processing  carry into bit i is c[i] = G[i-1] or (P[i-1] and cin),
//                    c[0] = cin; s[i] = p[i] xor c[i]; cout = c[N].
// The first level and the sum equation are the design's; the later levels
// follow the standard Kogge-Stone network, which also covers widths that are
// not powers of two (6, 12 and 24 are used by the multipliers). Folding in a
// carry-in is this design's addition: the multipliers tie it to 0.
module ks_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Level k holds group generate/propagate spanning up to 2**k bits.
  for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
    logic [N-1:0] gg;
    logic [N-1:0] pp;
    if (k == 0) begin : g_pre
      assign gg = x & y;
      assign pp = x ^ y;
    end else begin : g_prefix
      localparam int unsigned D = 1 << (k - 1);
      for (genvar i = 0; i < N; i++) begin : g_node
        if (i >= D) begin : g_black
          assign gg[i] = g_lvl[k-1].gg[i] | (g_lvl[k-1].pp[i] & g_lvl[k-1].gg[i-D]);
          assign pp[i] = g_lvl[k-1].pp[i] & g_lvl[k-1].pp[i-D];
        end else begin : g_pass
          assign gg[i] = g_lvl[k-1].gg[i];
          assign pp[i] = g_lvl[k-1].pp[i];
        end
      end
    end
  end

  logic [N-1:0] grp_g, grp_p;  // group generate/propagate of bits i..0
  logic [N:0]   c;             // carry into bit i

  assign grp_g = g_lvl[LEVELS].gg;
  assign grp_p = g_lvl[LEVELS].pp;
  assign c     = {grp_g | (grp_p & {N{cin}}), cin};

  assign s    = g_lvl[0].pp ^ c[N-1:0];
  assign cout = c[N];

endmodule : ks_adder
