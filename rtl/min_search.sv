// min_search: diagonal of the scaled inverse Q and the index of its minimum.
//
// With X = pi * P^-1 (tri_inv) and the pivot products D (chol_ff), the scaled
// inverse of G is Q = X^H diag(D) X, so its diagonal is
//   Q(j,j) = sum_k D(k) * |X(k,j)|^2 .
// The channel with the smallest Q(j,j) has the smallest post-detection error
// and is detected first (the argmin step of the VBLAST iteration). The search
// is a chain of K-1 compare-and-select muxes; on a tie the lower index wins.
// Fixed point: |X|^2 and each product with D(k) are shifted right by PSH and
// the sum is kept at W+5 bits, wide enough that nothing saturates (this
// design's choice).
//
// Timing: combinational with one output register; X and D are registered
// alongside so the next stage sees them aligned with the index.
module min_search
  import mimo_pkg::*;
#(
  parameter int K   = 4,
  parameter int W   = 24,
  parameter int PSH = W - 2,
  parameter int IW  = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_re_in [K][K],
  input  logic signed [W-1:0]  x_im_in [K][K],
  input  logic signed [W-1:0]  dlt_in  [K],
  output logic                 out_valid,
  output logic signed [W+4:0]  qd      [K],
  output logic        [IW-1:0] jmin,
  output logic signed [W-1:0]  x_re    [K][K],
  output logic signed [W-1:0]  x_im    [K][K],
  output logic signed [W-1:0]  dlt     [K]
);

  logic signed [W+4:0]  qd_d [K];
  logic        [IW-1:0] j_d;

  always_comb begin
    automatic longint best;
    for (int j = 0; j < K; j++) begin
      automatic longint acc;
      acc = 0;
      for (int k = j; k < K; k++) begin
        automatic longint mag;
        mag = (longint'(x_re_in[k][j]) * longint'(x_re_in[k][j]) +
               longint'(x_im_in[k][j]) * longint'(x_im_in[k][j])) >>> PSH;
        acc += (longint'(dlt_in[k]) * mag) >>> PSH;
      end
      qd_d[j] = (W+5)'(acc);
    end
    j_d  = '0;
    best = longint'(qd_d[0]);
    for (int j = 1; j < K; j++) begin
      if (longint'(qd_d[j]) < best) begin
        best = longint'(qd_d[j]);
        j_d  = IW'(j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    qd   <= qd_d;
    jmin <= j_d;
    x_re <= x_re_in;
    x_im <= x_im_in;
    dlt  <= dlt_in;
  end

endmodule
