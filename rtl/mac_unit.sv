// mac_unit: three-stage pipelined signed multiply-accumulate unit.
//
// The multiplier and the accumulator are merged: the accumulator value is
// added in carry-save form before the single carry-propagate adder, so a
// MAC costs no more adder delay than a multiply.
//   Stage 1: Booth encoding, partial-product selection (booth_pp_array, all
//            rows already ACC_W bits wide) and the first row level of 4:2
//            compressors; K = N/2 rows become K/2, registered with the
//            +1 bit of the last row (neg_last) that the tree cannot hold.
//   Stage 2: the remaining 4:2 compressor levels reduce to carry-save form
//            (sum and carry rows); a row of half adders (a csa_row with only
//            neg_last in its third operand) absorbs the held-back bit.
//            Sum and carry are registered.
//   Stage 3: a row of AND gates gates the accumulator feedback (zero for a
//            plain multiply), a row of full adders merges it with the sum and
//            carry rows, and an ACC_W-bit carry look-ahead adder completes the
//            result. In parallel an arithmetic right shifter shifts the
//            accumulator; the instruction selects which result is loaded.
// Latency is three cycles and one instruction can be issued every cycle:
// an instruction sampled with in_valid at clock edge t updates acc at edge
// t+2 and out_valid is high for the cycle after that edge.
// A MAC or shift issued right behind another instruction sees the
// accumulator that instruction produced, because all of them update the
// accumulator in stage 3 in issue order.
// Following the description: Booth-Wallace multiplier, three pipe stages,
// 4:2 compressors plus a half-adder row, AND-gate feedback gating, full-adder
// row, accumulator shifter, N = 32 and 8 accumulator guard bits (40 bits for
// a 16 x 16 unit). This design's own choices: a CLA as final adder (the
// chosen accumulation adder) rather than a carry select adder, the op
// encoding, the shift-amount port, synchronous active-low reset, and
// wrap-around (no saturation) on accumulator overflow.
module mac_unit
  import arith_pkg::*;
#(
  parameter int N     = 32,
  parameter int GUARD = 8,
  localparam int ACC_W = 2 * N + GUARD,
  localparam int SH_W  = $clog2(ACC_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  mac_op_e          op,
  input  logic [N-1:0]     a,        // multiplier, two's complement
  input  logic [N-1:0]     b,        // multiplicand, two's complement
  input  logic [SH_W-1:0]  shamt,    // shift amount for OP_SHR
  output logic [ACC_W-1:0] acc,
  output logic             out_valid
);
  localparam int K  = N / 2;          // partial-product rows
  localparam int R1 = K / 2;          // rows after the first compressor level

  typedef struct packed {
    logic            valid;
    mac_op_e         op;
    logic [SH_W-1:0] shamt;
  } ctrl_t;

  // ---------------- stage 1 ----------------
  logic [ACC_W-1:0] pp_rows [K];
  logic [ACC_W-1:0] s1_rows [R1];
  logic             neg_last;

  booth_pp_array #(.N(N), .W(ACC_W)) u_pp (.a(a), .b(b), .rows(pp_rows), .neg_last(neg_last));
  tree_4to2 #(.ROWS(K), .W(ACC_W), .LEVELS(1)) u_tree1 (.in_rows(pp_rows), .out_rows(s1_rows));

  logic [ACC_W-1:0] r1_rows [R1];
  logic             r1_neg;
  ctrl_t            r1_ctrl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1_ctrl <= '0;
      r1_neg  <= 1'b0;
      for (int i = 0; i < R1; i++) r1_rows[i] <= '0;
    end else begin
      r1_ctrl <= '{valid: in_valid, op: in_valid ? op : OP_NOP, shamt: shamt};
      r1_neg  <= neg_last;
      for (int i = 0; i < R1; i++) r1_rows[i] <= s1_rows[i];
    end
  end

  // ---------------- stage 2 ----------------
  logic [ACC_W-1:0] cs_rows [2];
  logic [ACC_W-1:0] fix, s2_sum, s2_carry;

  tree_4to2 #(.ROWS(R1), .W(ACC_W), .LEVELS($clog2(R1) - 1)) u_tree2 (.in_rows(r1_rows), .out_rows(cs_rows));
  always_comb begin
    fix = '0;
    fix[N-2] = r1_neg;
  end
  csa_row #(.W(ACC_W)) u_ha_row (.x0(cs_rows[0]), .x1(cs_rows[1]), .x2(fix), .sum_row(s2_sum), .carry_row(s2_carry));

  logic [ACC_W-1:0] r2_sum, r2_carry;
  ctrl_t            r2_ctrl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r2_ctrl  <= '0;
      r2_sum   <= '0;
      r2_carry <= '0;
    end else begin
      r2_ctrl  <= r1_ctrl;
      r2_sum   <= s2_sum;
      r2_carry <= s2_carry;
    end
  end

  // ---------------- stage 3 ----------------
  logic [ACC_W-1:0] acc_fb, s3_sum, s3_carry, mac_res, shr_res;
  logic             unused_cout;

  assign acc_fb = acc & {ACC_W{r2_ctrl.op == OP_MAC}};   // row of AND gates
  csa_row #(.W(ACC_W)) u_fa_row (.x0(r2_sum), .x1(r2_carry), .x2(acc_fb), .sum_row(s3_sum), .carry_row(s3_carry));
  cla_adder #(.WIDTH(ACC_W)) u_cpa (.a(s3_sum), .b(s3_carry), .cin(1'b0), .sum(mac_res), .cout(unused_cout));
  assign shr_res = ACC_W'($signed(acc) >>> r2_ctrl.shamt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= r2_ctrl.valid;
      unique case (r2_ctrl.op)
        OP_MUL, OP_MAC: acc <= mac_res;
        OP_SHR:         acc <= shr_res;
        default:        acc <= acc;
      endcase
    end
  end

  initial assert (N % 8 == 0 && N >= 8) else $error("mac_unit: N must be a multiple of 8");
endmodule
