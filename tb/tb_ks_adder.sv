// tb_ks_adder: self-checking test of the 32-bit ks_adder. Applies worst-case carry
// patterns (all-ones plus one, alternating bits, a carry generated in the
// lowest group that must skip or ripple through all others) and random
// operands with both carry-in values, and compares {cout, sum} with the
// simulator's own 33-bit addition.
module tb_ks_adder;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  logic        cin, co;

  ks_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));


  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic ci);
    logic [32:0] exp;
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(ci);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, expected %h", x, y, ci, {co, s}, exp);
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
    for (int ci = 0; ci < 2; ci++) begin
      check(32'hFFFF_FFFF, 32'h0000_0001, ci[0]);
      check(32'hFFFF_FFFF, 32'h0000_0000, ci[0]);
      check(32'hFFFF_FFF8, 32'h0000_0008, ci[0]);
      check(32'hAAAA_AAAA, 32'h5555_5555, ci[0]);
      check(32'h8000_0000, 32'h8000_0000, ci[0]);
      check(32'h0000_0000, 32'h0000_0000, ci[0]);
      for (int k = 0; k < 32; k++) check(32'hFFFF_FFFF >> k, 32'h1, ci[0]);
    end
    for (int i = 0; i < 5000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
