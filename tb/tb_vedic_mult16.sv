// Self-checking testbench for vedic_mult16. Two instances, one built with
// ripple-carry adders (the default) and one with Kogge-Stone adders, get the
// same operands: the reference waveform's vectors, then corner cases and 100,000 random operand pairs.
// Both products are compared with the integer product a*b worked out in the
// testbench. Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_vedic_mult16;
  import vedic_pkg::*;
  localparam int unsigned N = 16;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_rca, p_ksa;
  int checks = 0, failures = 0;

  vedic_mult16 dut_rca (.a(a), .b(b), .p(p_rca));
  vedic_mult16 #(.ADDER(ADDER_KSA)) dut_ksa (.a(a), .b(b), .p(p_ksa));

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
    // reference vector: all ones times all ones
    check('1, '1);
    checks++;
    if (p_rca !== 32'hfffe0001) failures++;
    check('0, '0);
    check('1, '0);
    check('0, '1);
    check(16'h0001, '1);
    check(16'h8000, 16'h8000);
    check(16'h00ff, 16'hff00);
    check(16'hff00, 16'h00ff);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(16'(1 << i), ~16'(1 << j));
    for (int i = 0; i < 100000; i++)
      check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
