// gram_unit: G matrix of one VBLAST iteration, G = H^H H + sigma^2 I.
//
// H is the NR x K channel matrix of the K channels still active in this
// iteration. Each entry of the lower triangle is a sum of NR conjugate products
// formed at full precision and shifted right by the fixed amount GSH, which
// sets the units of the scaled noise variance sigma2 added to the diagonal.
// The whole matrix is then normalised by one common shift, so that its
// largest diagonal entry (the largest entry of a positive definite matrix)
// lies in [2^(W-2), 2^(W-1)), and stored as W-bit values. A common positive
// factor on G changes neither the detection order nor the decisions. The
// upper triangle is the conjugate of the lower one, so G is exactly Hermitian
// with a real diagonal. The document gives the formula; GSH and the
// normalisation are this design's choices.
//
// Timing: one register stage, a new H every cycle; out_valid follows in_valid
// by one cycle. sigma2 is a per-frame value and must be held steady.
module gram_unit
  import mimo_pkg::*;
#(
  parameter int NR  = 4,
  parameter int K   = 4,
  parameter int W   = 24,
  parameter int GSH = W - 1 + $clog2(NR)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] h_re   [NR][K],
  input  logic signed [W-1:0] h_im   [NR][K],
  input  logic        [W-2:0] sigma2,
  output logic                out_valid,
  output logic signed [W-1:0] g_re   [K][K],
  output logic signed [W-1:0] g_im   [K][K]
);

  logic signed [W-1:0] g_re_d [K][K];
  logic signed [W-1:0] g_im_d [K][K];

  always_comb begin
    automatic cl_t    gf [K][K];
    automatic longint dmax;
    automatic int     ns;
    dmax = 0;
    for (int a = 0; a < K; a++) begin
      for (int b = 0; b < K; b++) begin
        gf[a][b]     = cmk(0, 0);
        g_re_d[a][b] = '0;
        g_im_d[a][b] = '0;
      end
    end
    // lower triangle at full precision (after the fixed pre-shift GSH)
    for (int a = 0; a < K; a++) begin
      for (int b = 0; b <= a; b++) begin
        automatic cl_t acc;
        acc = cmk(0, 0);
        for (int n = 0; n < NR; n++) begin
          acc = cadd(acc, cmul(cconj(cmk(longint'(h_re[n][a]), longint'(h_im[n][a]))),
                               cmk(longint'(h_re[n][b]), longint'(h_im[n][b]))));
        end
        gf[a][b] = cmk(acc.re >>> GSH, acc.im >>> GSH);
      end
      gf[a][a] = cmk(gf[a][a].re + longint'(sigma2), 0);
      if (gf[a][a].re > dmax) dmax = gf[a][a].re;
    end
    // common normalisation: the largest diagonal entry fills the word
    ns = nshift(dmax, W);
    for (int a = 0; a < K; a++) begin
      for (int b = 0; b <= a; b++) begin
        automatic cl_t q;
        q = csat(cmk(shs(gf[a][b].re, ns), shs(gf[a][b].im, ns)), W);
        g_re_d[a][b] = W'(q.re);
        g_im_d[a][b] = W'(q.im);
        g_re_d[b][a] = W'(q.re);
        g_im_d[b][a] = W'(sat(-q.im, W));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    g_re <= g_re_d;
    g_im <= g_im_d;
  end

endmodule
