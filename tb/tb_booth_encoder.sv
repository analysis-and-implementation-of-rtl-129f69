// tb_booth_encoder: exhaustive test of the Booth encoder against its truth
// table, written out here row by row as {selectm, select2m, select0, sign}
// for inputs m2 m1 m0 = 000 .. 111.
module tb_booth_encoder;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic [2:0] m;
  logic sm, s2m, s0, sg;
  logic [3:0] table_ref [8] = '{4'b0010, 4'b1000, 4'b1000, 4'b0100,
                                4'b0101, 4'b1001, 4'b1001, 4'b0011};

  booth_encoder dut (.m2(m[2]), .m1(m[1]), .m0(m[0]),
                     .selectm(sm), .select2m(s2m), .select0(s0), .sign(sg));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      m = 3'(i); #1;
      checks++;
      if ({sm, s2m, s0, sg} !== table_ref[i]) begin
        failures++;
        $display("FAIL m=%b: got %b expected %b", m, {sm, s2m, s0, sg}, table_ref[i]);
      end
      // exactly one select is active
      checks++;
      if (sm + s2m + s0 != 1) begin
        failures++;
        $display("FAIL m=%b: selects not one-hot", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
