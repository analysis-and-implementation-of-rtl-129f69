// tb_arith_top: end-to-end test of the whole top level at its default sizes.
// Every cycle it also applies new random operands to the five 32-bit adders
// and the four 32 x 32 multipliers and checks all of their outputs (adders
// against a 33-bit sum, the three unsigned multipliers against the unsigned
// product, the Booth-Wallace multiplier against the signed product); carry-out
// and negative-product cases are counted. For the MAC unit (72-bit
// accumulator), as in its own test: A reference model applies each instruction two clock
// edges after the edge that sampled it (three-cycle latency) and the
// accumulator and out_valid are compared after every edge, so both the values
// and the timing are checked, including that the accumulator holds between
// updates. Phases: directed MUL/MAC/SHR sequences, random back-to-back
// instructions with bubbles, a reset in mid-stream, and an accumulation long
// enough to wrap the accumulator. Each mechanism is counted and must occur.
module tb_arith_top;
  timeunit 1ns; timeprecision 1ps;
  import arith_pkg::*;

  localparam int N = 32;
  localparam int ACC_W = 2 * N + 8;
  localparam int SH_W = $clog2(ACC_W);

  int checks = 0, failures = 0;
  int n_mul = 0, n_mac = 0, n_shr = 0, n_nop = 0, n_bubble = 0, n_b2b = 0, n_wrap = 0, n_reset = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  mac_op_e op = OP_NOP;
  logic [N-1:0] a = '0, b = '0;
  logic [SH_W-1:0] shamt = '0;
  logic [ACC_W-1:0] acc;
  logic out_valid;

  logic [31:0] add_a = '0, add_b = '0;
  logic        add_cin = 1'b0;
  logic [32:0] sum_rca, sum_cska, sum_cla, sum_csla, sum_ks;
  logic [31:0] mul_a = '0, mul_b = '0;
  logic [63:0] prod_array, prod_booth, prod_wallace, prod_bw;
  int n_cout = 0, n_negprod = 0;

  arith_top dut (
    .clk(clk), .rst_n(rst_n), .mac_valid(in_valid), .mac_op(op), .mac_a(a), .mac_b(b),
    .mac_shamt(shamt), .mac_acc(acc), .mac_out_valid(out_valid),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
    .sum_rca(sum_rca), .sum_cska(sum_cska), .sum_cla(sum_cla), .sum_csla(sum_csla), .sum_ks(sum_ks),
    .mul_a(mul_a), .mul_b(mul_b),
    .prod_array(prod_array), .prod_booth(prod_booth), .prod_wallace(prod_wallace), .prod_bw(prod_bw)
  );

  // combinational comparison sets: new operands on every falling edge
  always @(negedge clk) begin
    logic [32:0] es;
    logic [63:0] eu, ess;
    #2;
    es  = {1'b0, add_a} + {1'b0, add_b} + 33'(add_cin);
    eu  = {32'b0, mul_a} * {32'b0, mul_b};
    ess = 64'($signed(mul_a) * $signed(mul_b));
    checks += 9;
    if (sum_rca !== es)  begin failures++; $display("FAIL rca %h+%h", add_a, add_b); end
    if (sum_cska !== es) begin failures++; $display("FAIL cska %h+%h", add_a, add_b); end
    if (sum_cla !== es)  begin failures++; $display("FAIL cla %h+%h", add_a, add_b); end
    if (sum_csla !== es) begin failures++; $display("FAIL csla %h+%h", add_a, add_b); end
    if (sum_ks !== es)   begin failures++; $display("FAIL ks %h+%h", add_a, add_b); end
    if (prod_array !== eu)   begin failures++; $display("FAIL array %h*%h", mul_a, mul_b); end
    if (prod_booth !== eu)   begin failures++; $display("FAIL booth %h*%h", mul_a, mul_b); end
    if (prod_wallace !== eu) begin failures++; $display("FAIL wallace %h*%h", mul_a, mul_b); end
    if (prod_bw !== ess)     begin failures++; $display("FAIL booth-wallace %h*%h", mul_a, mul_b); end
    if (es[32]) n_cout++;
    if (ess[63]) n_negprod++;
    add_a = $urandom; add_b = $urandom; add_cin = 1'($urandom);
    if ($urandom_range(7) == 0) add_b = ~add_a;          // full-length carry chain
    mul_a = $urandom; mul_b = $urandom;
  end

  always #5 clk = ~clk;

  // reference pipeline: slot 0 = sampled at the latest edge
  typedef struct {
    logic            v;
    mac_op_e         op;
    logic [N-1:0]    a, b;
    logic [SH_W-1:0] sh;
  } ins_t;
  ins_t q [3];
  logic [ACC_W-1:0] ref_acc;
  logic             ref_valid;
  mac_op_e          last_op;

  function automatic logic [ACC_W-1:0] prod(input logic [N-1:0] x, input logic [N-1:0] y);
    return ACC_W'($signed(x)) * ACC_W'($signed(y));
  endfunction

  always @(posedge clk) begin
    ins_t cur, done;
    logic [ACC_W:0] wide;
    cur = '{v: in_valid, op: in_valid ? op : OP_NOP, a: a, b: b, sh: shamt};
    if (!rst_n) begin
      q[0] = '{v: 1'b0, op: OP_NOP, a: '0, b: '0, sh: '0};
      q[1] = q[0]; q[2] = q[0];
      ref_acc = '0; ref_valid = 1'b0;
    end else begin
      q[2] = q[1]; q[1] = q[0]; q[0] = cur;
      done = q[2];
      ref_valid = done.v;
      case (done.op)
        OP_MUL: ref_acc = prod(done.a, done.b);
        OP_MAC: begin
          wide = {ref_acc[ACC_W-1], ref_acc} + {prod(done.a, done.b)[ACC_W-1], prod(done.a, done.b)};
          if (wide[ACC_W] != wide[ACC_W-1]) n_wrap++;
          ref_acc = wide[ACC_W-1:0];
        end
        OP_SHR: ref_acc = ACC_W'($signed(ref_acc) >>> done.sh);
        default: ;
      endcase
    end
    #1;
    checks++;
    if (acc !== ref_acc || out_valid !== ref_valid) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t acc=%h exp=%h valid=%b exp=%b", $time, acc, ref_acc, out_valid, ref_valid);
    end
  end

  task automatic issue(input logic v, input mac_op_e o, input logic [N-1:0] x, input logic [N-1:0] y, input int sh = 0);
    @(negedge clk);
    in_valid = v; op = o; a = x; b = y; shamt = SH_W'(sh);
    if (!v) n_bubble++;
    else begin
      case (o)
        OP_MUL: n_mul++;
        OP_MAC: n_mac++;
        OP_SHR: n_shr++;
        default: n_nop++;
      endcase
      if (o == OP_MAC && (last_op == OP_MAC || last_op == OP_MUL)) n_b2b++;
    end
    last_op = v ? o : OP_NOP;
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    last_op = OP_NOP;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // latency: a single MUL, count edges until out_valid
    issue(1, OP_MUL, 32'd1234, -32'sd5678);
    @(negedge clk); in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #2; lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d, expected 3", lat); end
    // directed: dot product, shifts, hold
    issue(1, OP_MUL, 32'h7FFF_FFFF, 32'h7FFF_FFFF);
    issue(1, OP_MAC, 32'h8000_0000, 32'h8000_0000);
    issue(1, OP_MAC, 32'hFFFF_FFFF, 32'h0000_0003);
    issue(1, OP_SHR, '0, '0, 7);
    issue(1, OP_NOP, '0, '0);
    issue(0, OP_MAC, 32'h1, 32'h1);
    issue(1, OP_MAC, 32'h4189_2112, 32'h0000_ACD5);
    // random stream
    for (int i = 0; i < 2000; i++) begin
      int r;
      mac_op_e o;
      r = $urandom_range(99);
      o = r < 15 ? OP_MUL : r < 80 ? OP_MAC : r < 90 ? OP_SHR : OP_NOP;
      issue($urandom_range(9) != 0, o, $urandom, $urandom, $urandom_range(ACC_W - 1));
    end
    // reset in the middle of a stream
    issue(1, OP_MAC, 32'h1234_5678, 32'h9ABC_DEF0);
    @(negedge clk); rst_n = 1'b0; in_valid = 1'b0; n_reset++;
    @(negedge clk); rst_n = 1'b1;
    // wrap the accumulator: (2^31)^2 = 2^62 added 600 times exceeds 2^71
    issue(1, OP_MUL, 32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 600; i++) issue(1, OP_MAC, 32'h8000_0000, 32'h8000_0000);
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(negedge clk);
    $display("mechanisms: mul=%0d mac=%0d shr=%0d nop=%0d bubble=%0d back_to_back=%0d wrap=%0d reset=%0d cout=%0d neg_product=%0d",
             n_mul, n_mac, n_shr, n_nop, n_bubble, n_b2b, n_wrap, n_reset, n_cout, n_negprod);
    checks++;
    if (n_cout == 0 || n_negprod == 0 || n_mul == 0 || n_mac == 0 || n_shr == 0 || n_nop == 0 || n_bubble == 0 || n_b2b == 0 || n_wrap == 0 || n_reset == 0) begin
      failures++; $display("FAIL some mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
