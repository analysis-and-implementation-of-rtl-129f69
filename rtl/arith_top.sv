// arith_top: top level. The main design is the 32 x 32 pipelined
// multiply-accumulate unit (mac_unit). Beside it, with their own ports, stand
// the 32-bit adders and 32 x 32 multipliers that the MAC's building blocks were
// chosen from: ripple carry, carry skip, carry look-ahead, carry select and
// Kogge-Stone adders sharing one operand pair, and array, radix-2 Booth,
// Wallace and modified-Booth Wallace multipliers sharing another. The adders
// and multipliers are combinational; only the MAC is clocked (three-cycle
// latency, one instruction per cycle, see mac_unit).
// The side-by-side arrangement and the shared operand ports are this
// design's own choice; the MAC follows the described architecture.
module arith_top
  import arith_pkg::*;
#(
  parameter int N     = 32,
  parameter int GUARD = 8,
  parameter int AW    = 32,
  localparam int ACC_W = 2 * N + GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // MAC unit
  input  logic                     mac_valid,
  input  mac_op_e                  mac_op,
  input  logic [N-1:0]             mac_a,
  input  logic [N-1:0]             mac_b,
  input  logic [$clog2(ACC_W)-1:0] mac_shamt,
  output logic [ACC_W-1:0]         mac_acc,
  output logic                     mac_out_valid,
  // adder comparison set: sum[k] = {cout, sum}
  input  logic [AW-1:0]            add_a,
  input  logic [AW-1:0]            add_b,
  input  logic                     add_cin,
  output logic [AW:0]              sum_rca,
  output logic [AW:0]              sum_cska,
  output logic [AW:0]              sum_cla,
  output logic [AW:0]              sum_csla,
  output logic [AW:0]              sum_ks,
  // multiplier comparison set
  input  logic [N-1:0]             mul_a,
  input  logic [N-1:0]             mul_b,
  output logic [2*N-1:0]           prod_array,    // unsigned
  output logic [2*N-1:0]           prod_booth,    // unsigned
  output logic [2*N-1:0]           prod_wallace,  // unsigned
  output logic [2*N-1:0]           prod_bw        // signed
);
  mac_unit #(.N(N), .GUARD(GUARD)) u_mac (
    .clk(clk), .rst_n(rst_n), .in_valid(mac_valid), .op(mac_op), .a(mac_a), .b(mac_b),
    .shamt(mac_shamt), .acc(mac_acc), .out_valid(mac_out_valid)
  );

  rca_adder  #(.WIDTH(AW)) u_rca  (.a(add_a), .b(add_b), .cin(add_cin), .sum(sum_rca[AW-1:0]),  .cout(sum_rca[AW]));
  cska_adder #(.WIDTH(AW)) u_cska (.a(add_a), .b(add_b), .cin(add_cin), .sum(sum_cska[AW-1:0]), .cout(sum_cska[AW]));
  cla_adder  #(.WIDTH(AW)) u_cla  (.a(add_a), .b(add_b), .cin(add_cin), .sum(sum_cla[AW-1:0]),  .cout(sum_cla[AW]));
  csla_adder #(.WIDTH(AW)) u_csla (.a(add_a), .b(add_b), .cin(add_cin), .sum(sum_csla[AW-1:0]), .cout(sum_csla[AW]));
  ks_adder   #(.WIDTH(AW)) u_ks   (.a(add_a), .b(add_b), .cin(add_cin), .sum(sum_ks[AW-1:0]),   .cout(sum_ks[AW]));

  array_mult         #(.N(N)) u_array   (.a(mul_a), .b(mul_b), .prod(prod_array));
  booth_mult         #(.N(N)) u_booth   (.a(mul_a), .b(mul_b), .prod(prod_booth));
  wallace_mult       #(.N(N)) u_wallace (.a(mul_a), .b(mul_b), .prod(prod_wallace));
  booth_wallace_mult #(.N(N)) u_bw      (.a(mul_a), .b(mul_b), .prod(prod_bw));
endmodule
