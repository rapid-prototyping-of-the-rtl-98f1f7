// vblast_detector: NxN MMSE-VBLAST detector for BPSK with the improved
// (square-root-free, division-free) Cholesky inversion.
//
// Data path: agc_scale multiplies the raw H and r by the per-frame 3-sigma
// factor lambda; then N estimation levels (level_est, K = N, N-1, ..., 1)
// each detect the strongest remaining channel, decide its BPSK symbol,
// cancel it from r and drop its column from H. The decisions come out per
// original transmit channel, together with the detection order.
//
// Defaults are the document's 4x4 detector with 24-bit signed data. The 2x2
// detector of the document is the same top with N = 2, W = 16.
//
// Interface: in_valid qualifies one received vector r (N complex samples) and
// its channel matrix H (N x N complex, H[rx][tx]). lambda (LW bits, LF
// fraction bits) and sigma2 (scaled noise variance in the units of the G
// matrix) are per-frame values held steady while a frame streams through.
// out_valid marks sym_neg[c] (1 = symbol -1, 0 = symbol +1 for transmit
// channel c) and order[i] (channel detected at level i).
//
// Timing: one vector per clock cycle, no stalls. Latency from in_valid to
// out_valid is 2 + sum_{K=1..N} (K+4) cycles: 13 for N = 2, 28 for N = 4
// (AGC register, the levels, output register).
// The last level (K = 1) also produces a reduced H and a cancelled r like
// every other level; nothing follows it, so those outputs are left unread.
module vblast_detector
  import mimo_pkg::*;
#(
  parameter int N   = 4,
  parameter int W   = 24,
  parameter int LW  = 18,
  parameter int LF  = 12,
  parameter int GSH = W - 1 + $clog2(N),
  parameter int PSH = W - 2,
  parameter int CW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic        [LW-1:0] lambda,
  input  logic        [W-2:0]  sigma2,
  input  logic signed [W-1:0]  h_re     [N][N],
  input  logic signed [W-1:0]  h_im     [N][N],
  input  logic signed [W-1:0]  r_re     [N],
  input  logic signed [W-1:0]  r_im     [N],
  output logic                 out_valid,
  output logic        [N-1:0]  sym_neg,
  output logic        [CW-1:0] order    [N]
);

  // Output time of level i, counted from the AGC output.
  function automatic int lvl_done(input int i);
    int t;
    t = 0;
    for (int l = 0; l <= i; l++) t += (N - l) + 4;
    return t;
  endfunction

  localparam int LAST = lvl_done(N - 1);

  logic                a_v;
  logic signed [W-1:0] a_hr [N][N];
  logic signed [W-1:0] a_hi [N][N];
  logic signed [W-1:0] a_rr [N];
  logic signed [W-1:0] a_ri [N];

  agc_scale #(.NR(N), .NT(N), .W(W), .LW(LW), .LF(LF)) u_agc (
    .clk, .rst_n, .in_valid, .lambda,
    .h_re, .h_im, .r_re, .r_im,
    .out_valid(a_v), .hs_re(a_hr), .hs_im(a_hi), .rs_re(a_rr), .rs_im(a_ri)
  );

  // Per-level decisions, aligned to the last level.
  logic          dec_neg [N];
  logic [CW-1:0] dec_idx [N];
  logic          last_v;

  for (genvar i = 0; i < N; i++) begin : g_lvl
    localparam int K  = N - i;
    localparam int KO = (K > 1) ? K - 1 : 1;
    localparam int DL = LAST - lvl_done(i);

    logic                 v_in;
    logic signed [W-1:0]  hr_in [N][K];
    logic signed [W-1:0]  hi_in [N][K];
    logic signed [W-1:0]  rr_in [N];
    logic signed [W-1:0]  ri_in [N];
    logic        [CW-1:0] ix_in [K];

    logic                 v_o;
    logic                 neg_o;
    logic        [CW-1:0] sidx_o;
    logic signed [W-1:0]  hr_o [N][KO];
    logic signed [W-1:0]  hi_o [N][KO];
    logic signed [W-1:0]  rr_o [N];
    logic signed [W-1:0]  ri_o [N];
    logic        [CW-1:0] ix_o [KO];

    if (i == 0) begin : g_src
      always_comb begin
        v_in  = a_v;
        hr_in = a_hr;
        hi_in = a_hi;
        rr_in = a_rr;
        ri_in = a_ri;
        for (int c = 0; c < N; c++) ix_in[c] = CW'(c);
      end
    end else begin : g_src
      always_comb begin
        v_in  = g_lvl[i-1].v_o;
        hr_in = g_lvl[i-1].hr_o;
        hi_in = g_lvl[i-1].hi_o;
        rr_in = g_lvl[i-1].rr_o;
        ri_in = g_lvl[i-1].ri_o;
        ix_in = g_lvl[i-1].ix_o;
      end
    end

    level_est #(.NR(N), .K(K), .W(W), .GSH(GSH), .PSH(PSH), .CW(CW), .KO(KO)) u_lvl (
      .clk, .rst_n, .in_valid(v_in),
      .h_re(hr_in), .h_im(hi_in), .r_re(rr_in), .r_im(ri_in), .idx(ix_in), .sigma2,
      .out_valid(v_o), .sym_neg(neg_o), .sym_idx(sidx_o),
      .h_re_o(hr_o), .h_im_o(hi_o), .r_re_o(rr_o), .r_im_o(ri_o), .idx_o(ix_o)
    );

    // Align this level's decision with the last level's.
    if (DL == 0) begin : g_nodly
      assign dec_neg[i] = neg_o;
      assign dec_idx[i] = sidx_o;
    end else begin : g_dly
      logic [DL-1:0][CW:0] sr;
      always_ff @(posedge clk) begin
        sr[0] <= {neg_o, sidx_o};
        for (int d = 1; d < DL; d++) sr[d] <= sr[d-1];
      end
      assign dec_neg[i] = sr[DL-1][CW];
      assign dec_idx[i] = sr[DL-1][CW-1:0];
    end
  end

  assign last_v = g_lvl[N-1].v_o;

  // Scatter the decisions to their transmit channels.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= last_v;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      sym_neg[dec_idx[i]] <= dec_neg[i];
      order[i]            <= dec_idx[i];
    end
  end

endmodule
