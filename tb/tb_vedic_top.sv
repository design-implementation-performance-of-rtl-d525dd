// End-to-end testbench for vedic_top at its default (and only) size: two
// 16x16 Vedic multipliers, ripple-carry and Kogge-Stone builds, on shared
// operands. Each product is compared with the integer product a*b, and the
// two builds with each other.
//
// It also counts how often the cases that exercise the design's mechanisms
// occur, and counts a failure for any that never does:
//   zero      an operand is 0 (all partial products 0, no carries)
//   max       both operands all ones (longest carry chains in every adder)
//   cross     the two crosswise 8x8 products plus the upper half of the low
//             product exceed 16 bits, so the middle column carries into the
//             high product
//   low_carry the crosswise product aH*bL plus the upper half of aL*bL
//             carries out of its lower 8 bits into the upper 8
//   paper     the reference waveform's 16-bit vector (all ones squared)
// Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_vedic_top;
  logic [15:0] a, b;
  logic [31:0] p_rca, p_ksa;
  int checks = 0, failures = 0;
  int n_zero = 0, n_max = 0, n_cross = 0, n_low_carry = 0, n_paper = 0;

  vedic_top dut (.a(a), .b(b), .p_rca(p_rca), .p_ksa(p_ksa));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    int unsigned q0, q1, q2;
    a = x; b = y;
    #1;
    exp = 32'(longint'(x) * longint'(y));
    q0 = int'(x[7:0]) * int'(y[7:0]);
    q1 = int'(x[15:8]) * int'(y[7:0]);
    q2 = int'(x[7:0]) * int'(y[15:8]);
    if (x == 0 || y == 0) n_zero++;
    if (x == '1 && y == '1) n_max++;
    if (q1 + q2 + (q0 >> 8) >= 32'h1_0000) n_cross++;
    if ((q1 & 32'hff) + (q0 >> 8) >= 32'h100) n_low_carry++;
    checks += 3;
    if (p_rca !== exp) begin
      failures++;
      $display("FAIL rca %h * %h = %h, expected %h", x, y, p_rca, exp);
    end
    if (p_ksa !== exp) begin
      failures++;
      $display("FAIL ksa %h * %h = %h, expected %h", x, y, p_ksa, exp);
    end
    if (p_rca !== p_ksa) begin
      failures++;
      $display("FAIL builds differ on %h * %h: %h vs %h", x, y, p_rca, p_ksa);
    end
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("%s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
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
    // reference vector: 1111111111111111 squared is 11111111111111100000000000000001
    check('1, '1);
    checks++;
    if (p_rca == 32'b11111111111111100000000000000001) n_paper++;
    else failures++;
    check('0, 16'h1234);
    check(16'hbeef, '0);
    check(16'h00ff, 16'h00ff);
    check(16'hff00, 16'hff00);
    check(16'h8001, 16'h7fff);
    for (int i = 0; i < 50000; i++)
      check(16'($urandom), 16'($urandom));
    require("zero", n_zero);
    require("max", n_max);
    require("cross", n_cross);
    require("low_carry", n_low_carry);
    require("paper", n_paper);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
