// tb_booth_wallace_mult: self-checking test of the signed modified-Booth
// Wallace-tree multiplier at N = 32, N = 16 and N = 8 (the three sizes the
// design was evaluated at; the 8-bit one is checked exhaustively). Drives corner operands
// (zero, -1, most negative, most positive), the published operand pair
// a = 0x41892112, b = 0x0000ACD5, and random pairs, and compares with the
// product computed by the simulator's own signed multiplication.
module tb_booth_wallace_mult;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32;
  logic [63:0] p32;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;

  booth_wallace_mult #(.N(32)) dut32 (.a(a32), .b(b32), .prod(p32));
  booth_wallace_mult #(.N(16)) dut16 (.a(a16), .b(b16), .prod(p16));
  booth_wallace_mult #(.N(8))  dut8  (.a(a8),  .b(b8),  .prod(p8));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic signed [63:0] exp;
    a32 = x; b32 = y; #1;
    exp = $signed(x) * $signed(y);
    checks++;
    if (p32 !== exp) begin
      failures++;
      $display("FAIL 32: %h * %h = %h, expected %h", x, y, p32, exp);
    end
  endtask

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic signed [31:0] exp;
    a16 = x; b16 = y; #1;
    exp = $signed(x) * $signed(y);
    checks++;
    if (p16 !== exp) begin
      failures++;
      $display("FAIL 16: %h * %h = %h, expected %h", x, y, p16, exp);
    end
  endtask

  task automatic check8(input logic [7:0] x, input logic [7:0] y);
    logic signed [15:0] exp;
    a8 = x; b8 = y; #1;
    exp = $signed(x) * $signed(y);
    checks++;
    if (p8 !== exp) begin
      failures++;
      $display("FAIL 8: %h * %h = %h, expected %h", x, y, p8, exp);
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
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'hAAAA_AAAA};
    foreach (corners[i]) foreach (corners[j]) begin
      check32(corners[i], corners[j]);
      check16(corners[i][15:0], corners[j][31:16] ^ corners[j][15:0]);
    end
    check32(32'h4189_2112, 32'h0000_ACD5);
    if (p32 !== 64'h0000_2C3E_A950_9BFA) begin
      failures++;
      $display("FAIL published operand pair: %h", p32);
    end
    checks++;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check8(8'(x), 8'(y));
    for (int i = 0; i < 3000; i++) begin
      check32($urandom, $urandom);
      check16(16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
