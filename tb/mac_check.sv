// mac_check: cycle-by-cycle checker for one mac_unit of operand width N
// (accumulator 2N + 8 bits). A reference model applies each instruction two
// clock edges after the edge that sampled it (three-cycle latency) and the
// accumulator and out_valid are compared after every edge, so both the values
// and the timing are checked, including that the accumulator holds between
// updates. Phases: a latency measurement, directed MUL/MAC/SHR sequences,
// random back-to-back instructions with bubbles, a reset in mid-stream, and an
// accumulation long enough to wrap the accumulator. Each mechanism is counted
// and must occur. Raises done when finished; checks and failures are totals.
module mac_check
  import arith_pkg::*;
#(
  parameter int N = 32
) (
  output logic done,
  output int   checks,
  output int   failures
);
  timeunit 1ns; timeprecision 1ps;

  localparam int ACC_W = 2 * N + 8;
  localparam logic [N-1:0] MIN_V = {1'b1, {(N-1){1'b0}}};
  localparam logic [N-1:0] MAX_V = {1'b0, {(N-1){1'b1}}};
  localparam int SH_W = $clog2(ACC_W);

  initial begin checks = 0; failures = 0; done = 1'b0; end
  int n_mul = 0, n_mac = 0, n_shr = 0, n_nop = 0, n_bubble = 0, n_b2b = 0, n_wrap = 0, n_reset = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  mac_op_e op = OP_NOP;
  logic [N-1:0] a = '0, b = '0;
  logic [SH_W-1:0] shamt = '0;
  logic [ACC_W-1:0] acc;
  logic out_valid;

  mac_unit #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .a(a), .b(b),
                         .shamt(shamt), .acc(acc), .out_valid(out_valid));

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
      if (failures < 10) $display("FAIL N=%0d t=%0t acc=%h exp=%h valid=%b exp=%b", N, $time, acc, ref_acc, out_valid, ref_valid);
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
    int lat;
    last_op = OP_NOP;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // latency: a single MUL, count edges until out_valid
    issue(1, OP_MUL, N'(1234), N'(-5678));
    @(negedge clk); in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #2; lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL N=%0d latency %0d, expected 3", N, lat); end
    // directed: dot product, shifts, hold
    issue(1, OP_MUL, MAX_V, MAX_V);
    issue(1, OP_MAC, MIN_V, MIN_V);
    issue(1, OP_MAC, '1, N'(3));
    issue(1, OP_SHR, '0, '0, 7);
    issue(1, OP_NOP, '0, '0);
    issue(0, OP_MAC, N'(1), N'(1));
    issue(1, OP_MAC, N'(32'h4189_2112), N'(32'h0000_ACD5));
    // random stream
    for (int i = 0; i < 4000; i++) begin
      int r;
      mac_op_e o;
      r = $urandom_range(99);
      o = r < 15 ? OP_MUL : r < 80 ? OP_MAC : r < 90 ? OP_SHR : OP_NOP;
      issue($urandom_range(9) != 0, o, N'($urandom), N'($urandom), $urandom_range(ACC_W - 1));
    end
    // reset in the middle of a stream
    issue(1, OP_MAC, N'(32'h1234_5678), N'(32'h9ABC_DEF0));
    @(negedge clk); rst_n = 1'b0; in_valid = 1'b0; n_reset++;
    @(negedge clk); rst_n = 1'b1;
    // wrap the accumulator: (2^(N-1))^2 = 2^(2N-2) added 600 times exceeds 2^(2N+7)
    issue(1, OP_MUL, MIN_V, MIN_V);
    for (int i = 0; i < 600; i++) issue(1, OP_MAC, MIN_V, MIN_V);
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(negedge clk);
    $display("N=%0d mechanisms: mul=%0d mac=%0d shr=%0d nop=%0d bubble=%0d back_to_back=%0d wrap=%0d reset=%0d",
             N, n_mul, n_mac, n_shr, n_nop, n_bubble, n_b2b, n_wrap, n_reset);
    checks++;
    if (n_mul == 0 || n_mac == 0 || n_shr == 0 || n_nop == 0 || n_bubble == 0 || n_b2b == 0 || n_wrap == 0 || n_reset == 0) begin
      failures++; $display("FAIL N=%0d: some mechanism never occurred", N);
    end
    done = 1'b1;
  end
endmodule
