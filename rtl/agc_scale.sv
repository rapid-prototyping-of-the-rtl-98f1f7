// agc_scale: 3-sigma automatic gain control scaling of the detector input.
//
// Multiplies every real and imaginary part of the received vector r and of
// the channel matrix H by the same per-frame factor lambda, so that three
// standard deviations of r span the signed W-bit range:
//   lambda = (2^W - 1) / (6 * sqrt(1/2 + sigma_n^2/2))
// lambda itself needs a square root and a division and is computed once per
// frame outside this block (in software, as the document partitions it); it
// arrives as an unsigned fixed-point number with LF fraction bits. Each
// product is shifted right by LF (truncation) and saturated to W bits; the
// input samples are W-bit signed values of the front end. The lambda format
// and the truncation are this design's choices.
//
// Timing: one register stage, one (H, r) set per cycle; out_valid follows
// in_valid by one cycle.
module agc_scale
  import mimo_pkg::*;
#(
  parameter int NR = 4,
  parameter int NT = 4,
  parameter int W  = 24,
  parameter int LW = 18,
  parameter int LF = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic        [LW-1:0] lambda,
  input  logic signed [W-1:0] h_re  [NR][NT],
  input  logic signed [W-1:0] h_im  [NR][NT],
  input  logic signed [W-1:0] r_re  [NR],
  input  logic signed [W-1:0] r_im  [NR],
  output logic                out_valid,
  output logic signed [W-1:0] hs_re [NR][NT],
  output logic signed [W-1:0] hs_im [NR][NT],
  output logic signed [W-1:0] rs_re [NR],
  output logic signed [W-1:0] rs_im [NR]
);

  function automatic logic signed [W-1:0] scale(input logic signed [W-1:0] x,
                                                input logic [LW-1:0] l);
    return W'(qz(longint'(x) * longint'({1'b0, l}), LF, W));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int n = 0; n < NR; n++) begin
      for (int c = 0; c < NT; c++) begin
        hs_re[n][c] <= scale(h_re[n][c], lambda);
        hs_im[n][c] <= scale(h_im[n][c], lambda);
      end
      rs_re[n] <= scale(r_re[n], lambda);
      rs_im[n] <= scale(r_im[n], lambda);
    end
  end

endmodule
