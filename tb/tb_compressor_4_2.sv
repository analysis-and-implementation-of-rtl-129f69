// tb_compressor_4_2: exhaustive test of the 4:2 compressor. For all 32 input
// combinations, in1+in2+in3+in4+cin = sum + 2*(carry + cout), and cout must
// not depend on cin.
module tb_compressor_4_2;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [4:0] x;
  logic s, c, co, co_prev;

  compressor_4_2 dut (.in1(x[0]), .in2(x[1]), .in3(x[2]), .in4(x[3]), .cin(x[4]),
                      .sum(s), .carry(c), .cout(co));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = {1'b0, 4'(i)}; #1;
      co_prev = co;
      checks++;
      if (int'(s) + 2 * (int'(c) + int'(co)) != $countones(x)) begin
        failures++; $display("FAIL x=%b", x);
      end
      x[4] = 1'b1; #1;
      checks++;
      if (int'(s) + 2 * (int'(c) + int'(co)) != $countones(x)) begin
        failures++; $display("FAIL x=%b", x);
      end
      checks++;
      if (co !== co_prev) begin
        failures++; $display("FAIL cout depends on cin for x=%b", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
