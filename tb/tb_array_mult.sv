// tb_array_mult: self-checking test of the unsigned 32 x 32 array_mult. Drives the two
// published operand pairs (0xAAAAAAAA x 0xF0F0F0F0 and 0x55555555 x
// 0xAAAAAAAA, whose printed products are checked literally), corner operands
// and random pairs, and compares with the simulator's 64-bit product.
module tb_array_mult;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [63:0] p;

  array_mult dut (.a(a), .b(b), .prod(p));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] exp;
    a = x; b = y; #1;
    exp = {32'b0, x} * {32'b0, y};
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
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
    check(32'hAAAA_AAAA, 32'hF0F0_F0F0);
    checks++;
    if (p !== 64'hA0A0_A09F_5F5F_5F60) begin failures++; $display("FAIL published pair 1"); end
    check(32'h5555_5555, 32'hAAAA_AAAA);
    checks++;
    if (p !== 64'h38E3_8E38_71C7_1C72) begin failures++; $display("FAIL published pair 2"); end
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h0, 32'hFFFF_FFFF);
    check(32'h8000_0000, 32'h8000_0001);
    check(32'h7FFF_FFFF, 32'h1);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
