// chol_ff: square-root-free and division-free Cholesky decomposition.
//
// The Hermitian positive definite K x K matrix G is factored as
//   G  ~  P * diag(D)^-1 * P^H ,
// where P is lower triangular and column k of P is column k of the k-th
// fraction-free Schur complement (A, B-bar, C-bar, D-bar of the 4x4 example
// in the document):
//   Y'(i,j) = Y(k,k)*Y(i,j) - Y(i,k)*conj(Y(j,k))      for i >= j > k.
// The true Cholesky factor is P with column k divided by sqrt(D(k)), so no
// square root or division is ever taken, and G^-1 ~ P^-H diag(D) P^-1: the
// diagonal matrix of the document's Eq. (8). D(k) is the product of the
// pivots up to k (D(0) = P(0,0), D(k) = D(k-1)*P(k,k) with the stage scalings
// accounted for), so only the inverse of P is still needed (tri_inv).
//
// Fixed point (this design's choice; the document only says the stages can be
// pipelined): each Schur complement is computed at full precision and then
// normalised by one common shift t(k) so that its largest diagonal entry
// fills the W-bit word. A common factor on a Schur complement only rescales
// the later columns of P, which is compensated in D: with d the running
// scale (d = 1 before stage 0),
//   D(k) = P(k,k) * d ,   d <- D(k) * 2^-t(k) .
// D(k) is carried as a W-bit mantissa and an exponent; at the output all D
// are aligned to the largest exponent and given as W-bit values with one
// common scale.
//
// Pipeline (as in the document's Fig. 9): stage k finishes column k and D(k)
// and updates the trailing block; there are K register stages, so a new
// matrix is accepted every cycle and out_valid follows in_valid by K cycles.
// Only the lower triangle of G is read; the upper triangle of P is zero.
// The running scale and exponents registered by the last stage (q_dm, q_de,
// q_xe) have no later stage to read them; they are left in the generate loop
// for uniformity and synthesis removes them.
module chol_ff
  import mimo_pkg::*;
#(
  parameter int K   = 4,
  parameter int W   = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] g_re  [K][K],
  input  logic signed [W-1:0] g_im  [K][K],
  output logic                out_valid,
  output logic signed [W-1:0] p_re  [K][K],
  output logic signed [W-1:0] p_im  [K][K],
  output logic signed [W-1:0] dlt   [K]
);

  // Input of the first stage: lower triangle of G.
  logic signed [W-1:0] i_re [K][K];
  logic signed [W-1:0] i_im [K][K];

  always_comb begin
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K; j++) begin
        i_re[i][j] = (i >= j) ? g_re[i][j] : '0;
        i_im[i][j] = (i >  j) ? g_im[i][j] : '0;
      end
    end
  end

  localparam int EW = 16;  // exponent width

  for (genvar s = 0; s < K; s++) begin : g_stage
    // c_*: this stage's input, n_*: its result, q_*: its output register.
    // re/im: matrix, dm/de: running scale d, xm/xe: D(k) mantissa/exponent
    logic signed [W-1:0]  c_re [K][K];
    logic signed [W-1:0]  c_im [K][K];
    logic signed [W-1:0]  c_dm;
    logic signed [EW-1:0] c_de;
    logic signed [W-1:0]  c_xm [K];
    logic signed [EW-1:0] c_xe [K];
    logic                 c_v;
    logic signed [W-1:0]  n_re [K][K];
    logic signed [W-1:0]  n_im [K][K];
    logic signed [W-1:0]  n_dm;
    logic signed [EW-1:0] n_de;
    logic signed [W-1:0]  n_xm [K];
    logic signed [EW-1:0] n_xe [K];
    logic signed [W-1:0]  q_re [K][K];
    logic signed [W-1:0]  q_im [K][K];
    logic signed [W-1:0]  q_dm;
    logic signed [EW-1:0] q_de;
    logic signed [W-1:0]  q_xm [K];
    logic signed [EW-1:0] q_xe [K];
    logic                 q_v;

    if (s == 0) begin : g_src
      always_comb begin
        c_re = i_re;
        c_im = i_im;
        c_dm = W'(64'sd1 <<< (W - 2));       // d = 1
        c_de = EW'(-(W - 2));
        for (int i = 0; i < K; i++) begin
          c_xm[i] = '0;
          c_xe[i] = '0;
        end
        c_v = in_valid;
      end
    end else begin : g_src
      always_comb begin
        c_re = g_stage[s-1].q_re;
        c_im = g_stage[s-1].q_im;
        c_dm = g_stage[s-1].q_dm;
        c_de = g_stage[s-1].q_de;
        c_xm = g_stage[s-1].q_xm;
        c_xe = g_stage[s-1].q_xe;
        c_v  = g_stage[s-1].q_v;
      end
    end

    always_comb begin
      automatic longint piv;
      automatic longint prod;
      automatic longint emax;
      automatic longint dmax;
      automatic int     sd;
      automatic int     t;
      automatic cl_t    e [K][K];
      n_re = c_re;
      n_im = c_im;
      n_xm = c_xm;
      n_xe = c_xe;
      piv  = longint'(c_re[s][s]);
      // D(s) = P(s,s) * d, renormalised
      prod    = piv * longint'(c_dm);
      sd      = nshift(prod, W);
      n_xm[s] = W'(sat(shs(prod, sd), W));
      n_xe[s] = EW'(int'(c_de) + sd);
      // trailing Schur complement at full precision
      dmax = 0;
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) e[i][j] = cmk(0, 0);
      for (int i = s + 1; i < K; i++) begin
        for (int j = s + 1; j <= i; j++) begin
          automatic cl_t yik;
          automatic cl_t yjk;
          yik = cmk(longint'(c_re[i][s]), longint'(c_im[i][s]));
          yjk = cmk(longint'(c_re[j][s]), longint'(c_im[j][s]));
          e[i][j] = csub(cscale(piv, cmk(longint'(c_re[i][j]), longint'(c_im[i][j]))),
                         cmul(yik, cconj(yjk)));
        end
        if (e[i][i].re > dmax) dmax = e[i][i].re;
      end
      // common normalisation of the trailing block
      t = nshift(dmax, W);
      for (int i = s + 1; i < K; i++) begin
        for (int j = s + 1; j <= i; j++) begin
          n_re[i][j] = W'(sat(shs(e[i][j].re, t), W));
          n_im[i][j] = (i == j) ? '0 : W'(sat(shs(e[i][j].im, t), W));
        end
      end
      // d <- D(s) * 2^-t
      n_dm = n_xm[s];
      n_de = EW'(int'(n_xe[s]) - t);
      // last stage: align all D(k) to the largest exponent
      if (s == K - 1) begin
        emax = longint'(n_xe[0]);
        for (int k = 1; k < K; k++) if (longint'(n_xe[k]) > emax) emax = longint'(n_xe[k]);
        for (int k = 0; k < K; k++) begin
          n_xm[k] = W'(shs(longint'(n_xm[k]), int'(emax - longint'(n_xe[k]))));
          n_xe[k] = EW'(emax);
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q_v <= 1'b0;
      else        q_v <= c_v;
    end

    always_ff @(posedge clk) begin
      q_re <= n_re;
      q_im <= n_im;
      q_dm <= n_dm;
      q_de <= n_de;
      q_xm <= n_xm;
      q_xe <= n_xe;
    end
  end

  assign out_valid = g_stage[K-1].q_v;
  assign p_re      = g_stage[K-1].q_re;
  assign p_im      = g_stage[K-1].q_im;
  assign dlt       = g_stage[K-1].q_xm;

endmodule
