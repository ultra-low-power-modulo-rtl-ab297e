// Partial product generation for X*Y mod (2^N + 1).
//
// Inputs are (N+1)-bit numbers in [0, 2^N]; bit N is set only for the value 2^N.
// The full (N+1)x(N+1) product matrix splits into four groups of which only one
// can be non-zero: A (both below 2^N), B (X = 2^N), D (Y = 2^N) and C
// (X = Y = 2^N, the single term p_{N,N}). The groups are therefore merged with
// OR instead of addition: q_i = p_{N,i} | p_{i,N}. Using 2^(2N) = 1 and
// 2^(2N-1) = 2^(N-1) + 1 (mod 2^N+1), q_{N-1} appears at columns N-1 and 0, and
// p_{N,N} is ORed into column 0. Every bit whose weight 2^(N+j) is at or above
// 2^N is then moved down to column j inverted, since s*2^(N+j) = ~s*2^j - 2^j.
// The result is N rows of N bits, row i (i >= 1) being
//   column k >= i   : p_{k-i,i}
//   column k = i-1  : ~(p_{N-1,i} | q_{i-1})
//   column k < i-1  : ~p_{N-i+k,i}
// and row 0: p_{k,0}, with p_{N-1,0}|q_{N-1} at column N-1 and
// p_{0,0}|q_{N-1}|p_{N,N} at column 0. Row i holds i inverted bits, so
//   sum of rows = X*Y + (2^N - N - 1)   (mod 2^N + 1),
// which the constant operand of the reduction tree cancels. The matrix is the
// source's; all AND, OR and NOT gates are single GDI cells. Combinational.
module pp_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N:0]   x,
  input  logic [N:0]   y,
  output logic [N-1:0] pp [N]
);
  // p[i][j] = x_i & y_j for all i, j in 0..N (GDI AND: G=x_i, N=y_j, P=0)
  logic [N:0] p [N+1];
  logic [N-1:0] q;
  logic col0_a;

  for (genvar i = 0; i <= N; i++) begin : g_and_i
    for (genvar j = 0; j <= N; j++) begin : g_and_j
      gdi_cell u_and (.g(x[i]), .p(1'b0), .n(y[j]), .d(p[i][j]));
    end
  end

  // q_i = p_{N,i} | p_{i,N} (GDI OR: G=a, N=1, P=b)
  for (genvar i = 0; i < N; i++) begin : g_q
    gdi_cell u_or (.g(p[N][i]), .p(p[i][N]), .n(1'b1), .d(q[i]));
  end

  // row 0
  gdi_cell u_r0_top (.g(p[N-1][0]), .p(q[N-1]), .n(1'b1), .d(pp[0][N-1]));
  gdi_cell u_r0_b0a (.g(p[0][0]),   .p(q[N-1]), .n(1'b1), .d(col0_a));
  gdi_cell u_r0_b0b (.g(col0_a),    .p(p[N][N]), .n(1'b1), .d(pp[0][0]));
  for (genvar k = 1; k < N - 1; k++) begin : g_r0
    assign pp[0][k] = p[k][0];
  end

  // rows 1 .. N-1
  for (genvar i = 1; i < N; i++) begin : g_row
    logic merged;
    gdi_cell u_or (.g(p[N-1][i]), .p(q[i-1]), .n(1'b1), .d(merged));
    gdi_cell u_nm (.g(merged), .p(1'b1), .n(1'b0), .d(pp[i][i-1]));
    for (genvar k = 0; k < N; k++) begin : g_col
      if (k >= i) begin : g_keep
        assign pp[i][k] = p[k-i][i];
      end else if (k < i - 1) begin : g_inv
        gdi_cell u_not (.g(p[N-i+k][i]), .p(1'b1), .n(1'b0), .d(pp[i][k]));
      end
    end
  end

  initial begin
    assert (N >= 3) else $error("pp_gen: N must be at least 3");
  end
endmodule
