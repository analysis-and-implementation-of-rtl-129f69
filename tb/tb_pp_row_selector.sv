// tb_pp_row_selector: checks the 33-bit row selector (N = 32) for every
// select combination the encoder can produce and random multiplicands. The
// row, with its top bit inverted back and plus neg, must equal the Booth
// digit times the signed multiplicand as a 33-bit two's complement value.
module tb_pp_row_selector;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] mc;
  logic sm, s2m, sg;
  logic [32:0] row;
  logic neg;

  pp_row_selector #(.N(32)) dut (.mcand(mc), .selectm(sm), .select2m(s2m), .sign(sg), .row(row), .neg(neg));

  task automatic check(input logic [31:0] x, input int digit);
    logic signed [34:0] exp, got;
    mc = x;
    sm = (digit == 1 || digit == -1);
    s2m = (digit == 2 || digit == -2);
    sg = (digit < 0) || (digit == 0 && $urandom_range(1) == 1);   // 000 or 111
    #1;
    exp = 35'(digit) * 35'($signed(x));
    got = 35'($signed({~row[32], row[31:0]})) + 35'(neg);
    checks++;
    if (got[32:0] !== exp[32:0]) begin
      failures++;
      $display("FAIL mcand=%h digit=%0d: got %h expected %h", x, digit, got, exp);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++) begin
      check(32'h8000_0000, d);
      check(32'h7FFF_FFFF, d);
      check(32'hFFFF_FFFF, d);
      check(32'h0, d);
      for (int i = 0; i < 300; i++) check($urandom, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
