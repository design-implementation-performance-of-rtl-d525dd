// Self-checking testbench for vedic_mult2, the 2x2 Vedic element. It applies
// the three operand pairs of the reference waveform (01*10, 10*11, 10*10) and
// then every operand pair, comparing p with the integer product a*b. Ends with
// a TB_RESULT line; a watchdog stops it if it hangs.
module tb_vedic_mult2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mult2 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [1:0] x, input logic [1:0] y, input logic [3:0] exp);
    a = x; b = y;
    #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %b * %b = %b, expected %b", x, y, p, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference vectors with their printed products
    check(2'b01, 2'b10, 4'b0010);
    check(2'b10, 2'b11, 4'b0110);
    check(2'b10, 2'b10, 4'b0100);
    for (int i = 0; i < 16; i++)
      check(2'(i >> 2), 2'(i), 4'((i >> 2) * (i & 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
