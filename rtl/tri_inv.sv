// tri_inv: division-free inverse of the lower triangular Cholesky factor.
//
// Computes X = pi * P^-1, where pi is the product of the diagonal of P. The
// common factor pi removes every division of back substitution, as in the
// document's Eq. (9); any positive common factor is harmless because the
// detector only compares and takes signs of quantities built from X.
// Each column j is computed independently of the others (all columns in
// parallel, as in the document's Fig. 10):
//   V(j) = 1
//   for i = j+1 .. K-1:
//     V(i) = -sum_{k=j..i-1} P(i,k) * V(k)        (new element, row i)
//     V(k) = V(k) * P(i,i)        for j <= k < i   (bring to the common scale)
//   V(k) = V(k) * P(m,m)          for m < j        (factors of pi before j)
//   X(k,j) = V(k)
// Every product is shifted right by PSH = W-2, so multiplying by a pivot
// near 2^(W-2) keeps the scale; the starting "1" is 2^XSH = 2^(W-5), which
// leaves a factor of 8 of headroom for the growth of the off-diagonal
// elements before they saturate at W bits (mimo_pkg). The recursion order above fixes where the
// truncations happen; it is this design's choice.
// The diagonal weights D of chol_ff are carried through unchanged.
//
// Timing: purely combinational datapath with one output register; one matrix
// per cycle, out_valid follows in_valid by one cycle. X is lower triangular.
module tri_inv
  import mimo_pkg::*;
#(
  parameter int K   = 4,
  parameter int W   = 24,
  parameter int PSH = W - 2,
  parameter int XSH = W - 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] p_re    [K][K],
  input  logic signed [W-1:0] p_im    [K][K],
  input  logic signed [W-1:0] dlt_in  [K],
  output logic                out_valid,
  output logic signed [W-1:0] x_re    [K][K],
  output logic signed [W-1:0] x_im    [K][K],
  output logic signed [W-1:0] dlt     [K]
);

  logic signed [W-1:0] x_re_d [K][K];
  logic signed [W-1:0] x_im_d [K][K];

  always_comb begin
    automatic cl_t v [K];
    automatic cl_t acc;
    for (int a = 0; a < K; a++) begin
      for (int b = 0; b < K; b++) begin
        x_re_d[a][b] = '0;
        x_im_d[a][b] = '0;
      end
    end
    for (int j = 0; j < K; j++) begin
      for (int k = 0; k < K; k++) v[k] = cmk(0, 0);
      v[j] = cmk(64'sd1 <<< XSH, 0);
      for (int i = j + 1; i < K; i++) begin
        acc = cmk(0, 0);
        for (int k = j; k < i; k++)
          acc = cadd(acc, cmul(cmk(longint'(p_re[i][k]), longint'(p_im[i][k])), v[k]));
        for (int k = j; k < i; k++)
          v[k] = cqz(cscale(longint'(p_re[i][i]), v[k]), PSH, W);
        v[i] = cqz(cmk(-acc.re, -acc.im), PSH, W);
      end
      for (int m = 0; m < j; m++)
        for (int k = j; k < K; k++)
          v[k] = cqz(cscale(longint'(p_re[m][m]), v[k]), PSH, W);
      for (int k = j; k < K; k++) begin
        x_re_d[k][j] = W'(v[k].re);
        x_im_d[k][j] = W'(v[k].im);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    x_re <= x_re_d;
    x_im <= x_im_d;
    dlt  <= dlt_in;
  end

endmodule
