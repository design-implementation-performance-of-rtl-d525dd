// Self-checking testbench for rca_adder, the ripple carry adder. It checks the default 4-bit adder exhaustively (all x, y and cin), and a 24-bit instance (the widest the 16-bit multiplier uses) with random operands and full-length carry chains. Every result
// {cout, s} is compared with the integer sum x + y + cin worked out in the
// testbench. Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_rca_adder;
  localparam int unsigned NA = 4;  // default width
  localparam int unsigned NB = 24;  // second instance

  logic [NA-1:0] xa, ya, sa;
  logic          cina, couta;
  logic [NB-1:0] xb, yb, sb;
  logic          cinb, coutb;
  int checks = 0, failures = 0;

  rca_adder dut_a (.x(xa), .y(ya), .cin(cina), .s(sa), .cout(couta));
  rca_adder #(.N(NB)) dut_b (.x(xb), .y(yb), .cin(cinb), .s(sb), .cout(coutb));

  task automatic check_a(input logic [NA-1:0] x, input logic [NA-1:0] y, input logic c);
    logic [NA:0] exp;
    xa = x; ya = y; cina = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (NA+1)'(c);
    checks++;
    if ({couta, sa} !== exp) begin
      failures++;
      $display("FAIL N=%0d %h + %h + %b = %h, expected %h", NA, x, y, c, {couta, sa}, exp);
    end
  endtask

  task automatic check_b(input logic [NB-1:0] x, input logic [NB-1:0] y, input logic c);
    logic [NB:0] exp;
    xb = x; yb = y; cinb = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (NB+1)'(c);
    checks++;
    if ({coutb, sb} !== exp) begin
      failures++;
      $display("FAIL N=%0d %h + %h + %b = %h, expected %h", NB, x, y, c, {coutb, sb}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xb = '0; yb = '0; cinb = 1'b0;
    xa = '0; ya = '0; cina = 1'b0;
    // default width: every x, y and carry-in
    for (int i = 0; i < (1 << (2*NA+1)); i++)
      check_a(NA'(i >> (NA+1)), NA'(i >> 1), i[0]);
    // wide instance: carry rippling across all bits, then random operands
    check_b('1, '0, 1'b1);
    check_b('1, NB'(1), 1'b0);
    check_b('1, '1, 1'b1);
    check_b('0, '0, 1'b0);
    for (int i = 0; i < 20000; i++)
      check_b(NB'({$urandom, $urandom}), NB'({$urandom, $urandom}), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
