// Self-checking testbench for vedic_mult8. Two instances, one built with
// ripple-carry adders (the default) and one with Kogge-Stone adders, get the
// same operands: the reference waveform's vectors, then every operand pair.
// Both products are compared with the integer product a*b worked out in the
// testbench. Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_vedic_mult8;
  import vedic_pkg::*;
  localparam int unsigned N = 8;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_rca, p_ksa;
  int checks = 0, failures = 0;

  vedic_mult8 dut_rca (.a(a), .b(b), .p(p_rca));
  vedic_mult8 #(.ADDER(ADDER_KSA)) dut_ksa (.a(a), .b(b), .p(p_ksa));

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] exp;
    a = x; b = y;
    #1;
    exp = (2*N)'(longint'(x) * longint'(y));
    checks += 2;
    if (p_rca !== exp) begin
      failures++;
      $display("FAIL rca %h * %h = %h, expected %h", x, y, p_rca, exp);
    end
    if (p_ksa !== exp) begin
      failures++;
      $display("FAIL ksa %h * %h = %h, expected %h", x, y, p_ksa, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference vectors: 00000001*11111111 and 11111111*11111111
    check(8'h01, 8'hff);
    check(8'hff, 8'hff);
    checks++;
    if (p_rca !== 16'b1111111000000001) failures++;
    for (int i = 0; i < (1 << (2*N)); i++)
      check(N'(i >> N), N'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
