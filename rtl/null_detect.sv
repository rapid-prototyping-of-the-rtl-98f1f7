// null_detect: nulling vector, BPSK decision and interference cancellation.
//
// For the channel j chosen by min_search:
//   Q(j,a) = sum_k conj(X(k,j)) * D(k) * X(k,a)     row j of the scaled inverse
//   w(n)   = sum_a Q(j,a) * conj(H(n,a))             nulling vector, w = Q_j H^H
//   s      = (w . r) / (w . h_j)                     symbol estimate
// Q is a positive multiple of G^-1, so the scale cancels between numerator
// and denominator. For BPSK only the sign of s is needed, so the division is
// replaced by comparing the signs of Re(w.r) and Re(w.h_j): the symbol is -1
// when they differ. The decided symbol is then cancelled from the received
// vector, r <- r - s*h_j, and column j is removed from H and from the list of
// original channel numbers, giving the input of the next iteration.
// Fixed point: the Q row and w are shifted right by PSH and saturated to W
// bits; the two dot products are kept at full precision; r is saturated to
// W bits after cancellation. The BPSK sign decision and the shift choices are
// this design's reading of the estimation step.
//
// Timing: combinational with one output register; out_valid follows in_valid
// by one cycle. For K = 1 the H and index outputs carry no information.
module null_detect
  import mimo_pkg::*;
#(
  parameter int NR  = 4,
  parameter int K   = 4,
  parameter int W   = 24,
  parameter int PSH = W - 2,
  parameter int IW  = (K > 1) ? $clog2(K) : 1,
  parameter int CW  = (NR > 1) ? $clog2(NR) : 1,
  parameter int KO  = (K > 1) ? K - 1 : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_re    [K][K],
  input  logic signed [W-1:0]  x_im    [K][K],
  input  logic signed [W-1:0]  dlt     [K],
  input  logic        [IW-1:0] jmin,
  input  logic signed [W-1:0]  h_re    [NR][K],
  input  logic signed [W-1:0]  h_im    [NR][K],
  input  logic signed [W-1:0]  r_re    [NR],
  input  logic signed [W-1:0]  r_im    [NR],
  input  logic        [CW-1:0] idx     [K],
  output logic                 out_valid,
  output logic                 sym_neg,
  output logic        [CW-1:0] sym_idx,
  output logic signed [W-1:0]  h_re_o  [NR][KO],
  output logic signed [W-1:0]  h_im_o  [NR][KO],
  output logic signed [W-1:0]  r_re_o  [NR],
  output logic signed [W-1:0]  r_im_o  [NR],
  output logic        [CW-1:0] idx_o   [KO]
);

  logic                neg_d;
  logic signed [W-1:0] hr_d [NR][KO];
  logic signed [W-1:0] hi_d [NR][KO];
  logic signed [W-1:0] rr_d [NR];
  logic signed [W-1:0] ri_d [NR];
  logic        [CW-1:0] ix_d [KO];

  always_comb begin
    automatic cl_t    qrow [K];
    automatic cl_t    w    [NR];
    automatic longint num_re;
    automatic longint den_re;
    automatic int     j;
    j = int'(jmin);
    // row j of Q
    for (int a = 0; a < K; a++) begin
      automatic cl_t acc;
      acc = cmk(0, 0);
      for (int k = 0; k < K; k++) begin
        automatic cl_t dx;
        dx  = cqz(cscale(longint'(dlt[k]), cmk(longint'(x_re[k][a]), longint'(x_im[k][a]))), PSH, W);
        acc = cadd(acc, cmul(cconj(cmk(longint'(x_re[k][j]), longint'(x_im[k][j]))), dx));
      end
      qrow[a] = cqz(acc, PSH, W);
    end
    // nulling vector w = Q_j H^H
    for (int n = 0; n < NR; n++) begin
      automatic cl_t acc;
      acc = cmk(0, 0);
      for (int a = 0; a < K; a++)
        acc = cadd(acc, cmul(qrow[a], cconj(cmk(longint'(h_re[n][a]), longint'(h_im[n][a])))));
      w[n] = cqz(acc, PSH, W);
    end
    // numerator and denominator of the symbol estimate (real parts)
    num_re = 0;
    den_re = 0;
    for (int n = 0; n < NR; n++) begin
      num_re += cmul(w[n], cmk(longint'(r_re[n]), longint'(r_im[n]))).re;
      den_re += cmul(w[n], cmk(longint'(h_re[n][j]), longint'(h_im[n][j]))).re;
    end
    neg_d = (num_re < 0) != (den_re < 0);
    // cancellation r - s*h_j
    for (int n = 0; n < NR; n++) begin
      if (neg_d) begin
        rr_d[n] = W'(sat(longint'(r_re[n]) + longint'(h_re[n][j]), W));
        ri_d[n] = W'(sat(longint'(r_im[n]) + longint'(h_im[n][j]), W));
      end else begin
        rr_d[n] = W'(sat(longint'(r_re[n]) - longint'(h_re[n][j]), W));
        ri_d[n] = W'(sat(longint'(r_im[n]) - longint'(h_im[n][j]), W));
      end
    end
    // remove column j
    for (int c = 0; c < KO; c++) begin
      automatic logic [IW-1:0] src;
      src = (c < j || K == 1) ? IW'(c) : IW'(c + 1);
      ix_d[c] = idx[src];
      for (int n = 0; n < NR; n++) begin
        hr_d[n][c] = h_re[n][src];
        hi_d[n][c] = h_im[n][src];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    sym_neg <= neg_d;
    sym_idx <= idx[jmin];
    h_re_o  <= hr_d;
    h_im_o  <= hi_d;
    r_re_o  <= rr_d;
    r_im_o  <= ri_d;
    idx_o   <= ix_d;
  end

endmodule
