// level_est: one estimation level of MMSE-VBLAST (one iteration of the loop).
//
// With K channels still undetected, the level computes G = H^H H + sigma^2 I
// (gram_unit), factors it without square roots or divisions (chol_ff),
// inverts the triangular factor without divisions (tri_inv), picks the channel
// with the smallest diagonal entry of the scaled inverse (min_search), then
// forms the nulling vector, decides the BPSK symbol and cancels it from r
// (null_detect). Its outputs are the decided symbol with its original channel
// number and the reduced problem (H without that column, updated r) for the
// next level. An NxN detector is a chain of N levels with K = N, N-1, ..., 1,
// as the document's "Level 1 to 4 Estimation" blocks.
//
// Timing: fully pipelined, one new (H, r) per cycle. Latency is K+4 cycles:
// 1 (G) + K (Cholesky) + 1 (inversion) + 1 (minimum search) + 1 (detection).
// H, r and the channel numbers travel through a K+3 deep delay line so that
// they reach null_detect together with the selected index. sigma2 is held
// steady for a frame. The Q diagonal that min_search also outputs is not
// needed past the selection and is left unconnected here.
module level_est
  import mimo_pkg::*;
#(
  parameter int NR  = 4,
  parameter int K   = 4,
  parameter int W   = 24,
  parameter int GSH = W - 1 + $clog2(NR),
  parameter int PSH = W - 2,
  parameter int CW  = (NR > 1) ? $clog2(NR) : 1,
  parameter int KO  = (K > 1) ? K - 1 : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  h_re    [NR][K],
  input  logic signed [W-1:0]  h_im    [NR][K],
  input  logic signed [W-1:0]  r_re    [NR],
  input  logic signed [W-1:0]  r_im    [NR],
  input  logic        [CW-1:0] idx     [K],
  input  logic        [W-2:0]  sigma2,
  output logic                 out_valid,
  output logic                 sym_neg,
  output logic        [CW-1:0] sym_idx,
  output logic signed [W-1:0]  h_re_o  [NR][KO],
  output logic signed [W-1:0]  h_im_o  [NR][KO],
  output logic signed [W-1:0]  r_re_o  [NR],
  output logic signed [W-1:0]  r_im_o  [NR],
  output logic        [CW-1:0] idx_o   [KO]
);

  localparam int IW    = (K > 1) ? $clog2(K) : 1;
  localparam int DEPTH = K + 3;

  // Side data carried alongside the matrix pipeline.
  typedef struct packed {
    logic [NR-1:0][K-1:0][W-1:0] hr;
    logic [NR-1:0][K-1:0][W-1:0] hi;
    logic [NR-1:0][W-1:0]        rr;
    logic [NR-1:0][W-1:0]        ri;
    logic [K-1:0][CW-1:0]        ix;
  } side_t;

  side_t side_in;
  side_t side_q [DEPTH];

  always_comb begin
    for (int n = 0; n < NR; n++) begin
      for (int c = 0; c < K; c++) begin
        side_in.hr[n][c] = h_re[n][c];
        side_in.hi[n][c] = h_im[n][c];
      end
      side_in.rr[n] = r_re[n];
      side_in.ri[n] = r_im[n];
    end
    for (int c = 0; c < K; c++) side_in.ix[c] = idx[c];
  end

  always_ff @(posedge clk) begin
    side_q[0] <= side_in;
    for (int d = 1; d < DEPTH; d++) side_q[d] <= side_q[d-1];
  end

  // Delayed side data in the array form null_detect takes.
  logic signed [W-1:0]  dh_re [NR][K];
  logic signed [W-1:0]  dh_im [NR][K];
  logic signed [W-1:0]  dr_re [NR];
  logic signed [W-1:0]  dr_im [NR];
  logic        [CW-1:0] didx  [K];

  always_comb begin
    for (int n = 0; n < NR; n++) begin
      for (int c = 0; c < K; c++) begin
        dh_re[n][c] = side_q[DEPTH-1].hr[n][c];
        dh_im[n][c] = side_q[DEPTH-1].hi[n][c];
      end
      dr_re[n] = side_q[DEPTH-1].rr[n];
      dr_im[n] = side_q[DEPTH-1].ri[n];
    end
    for (int c = 0; c < K; c++) didx[c] = side_q[DEPTH-1].ix[c];
  end

  // Matrix pipeline.
  logic                 g_v, c_v, t_v, m_v;
  logic signed [W-1:0]  g_re [K][K];
  logic signed [W-1:0]  g_im [K][K];
  logic signed [W-1:0]  p_re [K][K];
  logic signed [W-1:0]  p_im [K][K];
  logic signed [W-1:0]  p_d  [K];
  logic signed [W-1:0]  x_re [K][K];
  logic signed [W-1:0]  x_im [K][K];
  logic signed [W-1:0]  x_d  [K];
  logic signed [W-1:0]  m_re [K][K];
  logic signed [W-1:0]  m_im [K][K];
  logic signed [W-1:0]  m_d  [K];
  logic signed [W+4:0]  qd   [K];
  logic        [IW-1:0] jmin;

  gram_unit #(.NR(NR), .K(K), .W(W), .GSH(GSH)) u_gram (
    .clk, .rst_n, .in_valid,
    .h_re, .h_im, .sigma2,
    .out_valid(g_v), .g_re, .g_im
  );

  chol_ff #(.K(K), .W(W)) u_chol (
    .clk, .rst_n, .in_valid(g_v),
    .g_re, .g_im,
    .out_valid(c_v), .p_re, .p_im, .dlt(p_d)
  );

  tri_inv #(.K(K), .W(W), .PSH(PSH)) u_inv (
    .clk, .rst_n, .in_valid(c_v),
    .p_re, .p_im, .dlt_in(p_d),
    .out_valid(t_v), .x_re, .x_im, .dlt(x_d)
  );

  min_search #(.K(K), .W(W), .PSH(PSH), .IW(IW)) u_min (
    .clk, .rst_n, .in_valid(t_v),
    .x_re_in(x_re), .x_im_in(x_im), .dlt_in(x_d),
    .out_valid(m_v), .qd, .jmin,
    .x_re(m_re), .x_im(m_im), .dlt(m_d)
  );

  null_detect #(.NR(NR), .K(K), .W(W), .PSH(PSH), .IW(IW), .CW(CW), .KO(KO)) u_det (
    .clk, .rst_n, .in_valid(m_v),
    .x_re(m_re), .x_im(m_im), .dlt(m_d), .jmin,
    .h_re(dh_re), .h_im(dh_im), .r_re(dr_re), .r_im(dr_im), .idx(didx),
    .out_valid, .sym_neg, .sym_idx,
    .h_re_o, .h_im_o, .r_re_o, .r_im_o, .idx_o
  );

endmodule
