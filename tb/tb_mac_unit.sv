// tb_mac_unit: self-checking test of the pipelined MAC at the two described
// sizes: 32 x 32 with a 72-bit accumulator (the default) and 16 x 16 with a
// 40-bit accumulator. Each size is driven and checked by its own mac_check
// instance (reference model, latency, mechanism counts); this module adds a
// watchdog and prints the combined result.
module tb_mac_unit;
  timeunit 1ns; timeprecision 1ps;

  logic done32, done16;
  int   checks32, failures32, checks16, failures16;

  mac_check #(.N(32)) u_chk32 (.done(done32), .checks(checks32), .failures(failures32));
  mac_check #(.N(16)) u_chk16 (.done(done16), .checks(checks16), .failures(failures16));

  initial begin
    #2ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks32 + checks16, failures32 + failures16 + 1);
    $finish;
  end

  initial begin
    wait (done32 && done16);
    $display("TB_RESULT checks=%0d failures=%0d", checks32 + checks16, failures32 + failures16);
    $finish;
  end
endmodule
