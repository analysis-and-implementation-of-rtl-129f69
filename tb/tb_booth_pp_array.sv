// tb_booth_pp_array: checks the partial-product generator with folded
// sign-extension constants at N = 32 (W = 64 and the MAC's W = 72) and at
// N = 16 (W = 32). The rows plus neg_last at column N-2 must sum to the signed
// product modulo 2^W, and row i must hold nothing below column 2i-2.
module tb_booth_pp_array;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [63:0] r64 [16];
  logic [71:0] r72 [16];
  logic [31:0] r32 [8];
  logic n64, n72, n32;

  booth_pp_array #(.N(32), .W(64)) dut64 (.a(a), .b(b), .rows(r64), .neg_last(n64));
  booth_pp_array #(.N(32), .W(72)) dut72 (.a(a), .b(b), .rows(r72), .neg_last(n72));
  booth_pp_array #(.N(16), .W(32)) dut32 (.a(a[15:0]), .b(b[15:0]), .rows(r32), .neg_last(n32));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] t64, e64;
    logic [71:0] t72, e72;
    logic [31:0] t32, e32;
    a = x; b = y; #1;
    e64 = 64'($signed(x) * $signed(y));
    e72 = 72'($signed(x)) * 72'($signed(y));
    e32 = 32'($signed(x[15:0]) * $signed(y[15:0]));
    t64 = 64'(n64) << 30;
    t72 = 72'(n72) << 30;
    t32 = 32'(n32) << 14;
    for (int i = 0; i < 16; i++) begin
      t64 += r64[i];
      t72 += r72[i];
      if (i > 0 && (r64[i] & ((64'd1 << (2*i-2)) - 1)) != 0) begin
        failures++; $display("FAIL row %0d has bits below column %0d", i, 2*i-2);
      end
    end
    for (int i = 0; i < 8; i++) t32 += r32[i];
    checks += 3;
    if (t64 !== e64) begin failures++; $display("FAIL W=64 %h*%h: %h vs %h", x, y, t64, e64); end
    if (t72 !== e72) begin failures++; $display("FAIL W=72 %h*%h: %h vs %h", x, y, t72, e72); end
    if (t32 !== e32) begin failures++; $display("FAIL N=16 %h*%h: %h vs %h", x[15:0], y[15:0], t32, e32); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h8000_8000, 32'h8000_8000);
    check(32'hFFFF_FFFF, 32'h7FFF_7FFF);
    check(32'h0, 32'h8000_8000);
    check(32'h5555_5555, 32'hAAAA_AAAA);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
