// booth_pp_array: partial-product generator of the signed modified-Booth
// multiplier. K = N/2 Booth encoders and row selectors (together one modified
// Booth recoder per row) produce K rows of N+1 bits, row i weighted 4^i.
// Sign extension is replaced by a constant: every row is taken as negative
// (sign-extended with ones), the ones of all rows are summed into one
// constant, and the constant is spread over the rows so no extra row is
// needed. In the W-bit output rows (placed at their final column):
//   row 0      : bits [N-1:0], s0 at N, s0 at N+1, ~s0 at N+2
//   row i >= 1 : bits [N-1:0], ~si at N, 1 at N+1 (row K-1: ones up to W-1)
// where si is the sign of row i. The +1 of each negated row (neg_i, weight
// 4^i) is placed in the empty column 2i of row i+1; the last one cannot be
// placed and is returned as neg_last (weight 2^(N-2)) for a later stage.
// The sum of all rows plus neg_last equals a*b modulo 2^W. W must be at least
// 2N. Combinational.
// The constant-ones sign-extension scheme follows the description; taking the
// clearing bit from the inverted top bit of each row (rather than an XNOR of
// the two sign bits) is this design's own choice and is also right for a zero digit.
module booth_pp_array #(
  parameter int N = 32,
  parameter int W = 2 * N
) (
  input  logic [N-1:0] a,          // multiplier (recoded)
  input  logic [N-1:0] b,          // multiplicand (selected)
  output logic [W-1:0] rows [N/2],
  output logic         neg_last
);
  localparam int K = N / 2;
  logic [N:0]   mb;                // multiplier with b(-1) = 0
  logic [N:0]   r   [K];
  logic [K-1:0] neg;
  assign mb = {a, 1'b0};

  for (genvar i = 0; i < K; i++) begin : g_row
    logic sm, s2m, s0, sg;
    booth_encoder u_enc (
      .m2(mb[2*i+2]), .m1(mb[2*i+1]), .m0(mb[2*i]),
      .selectm(sm), .select2m(s2m), .select0(s0), .sign(sg)
    );
    pp_row_selector #(.N(N)) u_sel (
      .mcand(b), .selectm(sm), .select2m(s2m), .sign(sg), .row(r[i]), .neg(neg[i])
    );
    if (i == 0) begin : g_first
      always_comb begin
        rows[i] = '0;
        rows[i][N-1:0] = r[i][N-1:0];
        rows[i][N]     = ~r[i][N];     // s0
        rows[i][N+1]   = ~r[i][N];     // s0
        rows[i][N+2]   = r[i][N];      // ~s0
      end
    end else begin : g_rest
      always_comb begin
        rows[i] = '0;
        rows[i][2*i +: N] = r[i][N-1:0];
        rows[i][2*i+N]    = r[i][N];   // ~si
        for (int k = 2*i+N+1; k < W; k++) begin
          // one constant 1 per row; the last row carries all higher ones
          if (k == 2*i+N+1 || i == K-1) rows[i][k] = 1'b1;
        end
        rows[i][2*i-2] = neg[i-1];     // +1 of the row below
      end
    end
  end
  assign neg_last = neg[K-1];
  initial assert (N % 2 == 0 && N >= 4 && W >= 2*N) else $error("booth_pp_array: bad N/W");
endmodule
