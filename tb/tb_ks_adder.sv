// Self-checking testbench for ks_adder, the Kogge-Stone adder. It checks the default 16-bit adder with random operands and full-length carry chains, and a 6-bit instance (a width that is not a power of two, used by the 4-bit multiplier) exhaustively. Every result
// {cout, s} is compared with the integer sum x + y + cin worked out in the
// testbench. Ends with a TB_RESULT line; a watchdog stops it if it hangs.
module tb_ks_adder;
  localparam int unsigned NA = 16;  // default width
  localparam int unsigned NB = 6;  // second instance

  logic [NA-1:0] xa, ya, sa;
  logic          cina, couta;
  logic [NB-1:0] xb, yb, sb;
  logic          cinb, coutb;
  int checks = 0, failures = 0;

  ks_adder dut_a (.x(xa), .y(ya), .cin(cina), .s(sa), .cout(couta));
  ks_adder #(.N(NB)) dut_b (.x(xb), .y(yb), .cin(cinb), .s(sb), .cout(coutb));

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
    // second instance: every x, y and carry-in
    for (int i = 0; i < (1 << (2*NB+1)); i++)
      check_b(NB'(i >> (NB+1)), NB'(i >> 1), i[0]);
    // default width: carry crossing all prefix levels, then random operands
    check_a('1, '0, 1'b1);
    check_a('1, NA'(1), 1'b0);
    check_a('1, '1, 1'b1);
    check_a('0, '0, 1'b0);
    check_a(NA'(16'h5555), NA'(16'haaab), 1'b0);
    for (int i = 0; i < 20000; i++)
      check_a(NA'({$urandom, $urandom}), NA'({$urandom, $urandom}), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
