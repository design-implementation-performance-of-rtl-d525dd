// N-bit adder used inside the Vedic multipliers: s = x + y, with the carry-out
// brought out and the carry-in held at 0. The ADDER parameter picks the
// ripple-carry adder (default) or the Kogge-Stone adder, so one multiplier
// description serves both builds. Combinational.
module vedic_adder
  import vedic_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter adder_kind_e ADDER = ADDER_RCA
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s,
  output logic         cout
);

  if (ADDER == ADDER_KSA) begin : g_ksa
    ks_adder #(.N(N)) u_add (.x(x), .y(y), .cin(1'b0), .s(s), .cout(cout));
  end else begin : g_rca
    rca_adder #(.N(N)) u_add (.x(x), .y(y), .cin(1'b0), .s(s), .cout(cout));
  end

endmodule : vedic_adder
