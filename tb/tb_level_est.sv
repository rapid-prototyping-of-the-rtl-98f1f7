// tb_level_est: self-checking test of one estimation level (K = 4 active
// channels). Random noisy BPSK vectors stream in one per cycle; the decided
// symbol, its channel number, the cancelled r, the reduced H and channel list
// are compared with the reference model, and the K+4 cycle latency is checked.
// A second instance with K = 1 (the last level) is checked the same way.
module tb_level_est;
  import vblast_ref_pkg::*;
  localparam int NR = 4, K = 4, W = 24, PSH = W - 2, GSH = W + 1, NV = 300;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid, out_valid1;
  logic signed [W-1:0] h_re [NR][K], h_im [NR][K], r_re [NR], r_im [NR];
  logic [1:0] idx [K];
  logic [W-2:0] sigma2;
  logic sym_neg, sym_neg1;
  logic [1:0] sym_idx, sym_idx1;
  logic signed [W-1:0] h_re_o [NR][K-1], h_im_o [NR][K-1], r_re_o [NR], r_im_o [NR];
  logic [1:0] idx_o [K-1];
  // K = 1 instance, fed with column 0 of the same data
  logic signed [W-1:0] h1_re [NR][1], h1_im [NR][1], h1_re_o [NR][1], h1_im_o [NR][1];
  logic signed [W-1:0] r1_re_o [NR], r1_im_o [NR];
  logic [1:0] idx1 [1], idx1_o [1];
  int checks = 0, failures = 0, cyc = 0, t_in[$], t_in1[$], got = 0, got1 = 0;
  longint exp_q[$], exp1_q[$];

  level_est #(.NR(NR), .K(K), .W(W)) dut (.*);

  level_est #(.NR(NR), .K(1), .W(W)) dut1 (
    .clk, .rst_n, .in_valid, .h_re(h1_re), .h_im(h1_im), .r_re, .r_im, .idx(idx1), .sigma2,
    .out_valid(out_valid1), .sym_neg(sym_neg1), .sym_idx(sym_idx1),
    .h_re_o(h1_re_o), .h_im_o(h1_im_o), .r_re_o(r1_re_o), .r_im_o(r1_im_o), .idx_o(idx1_o)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m4_t hr, hi, gr, gi, pr, pi, xr, xi, h1r, h1i;
    v4_t d, q, rr, ri, r1r, r1i;
    i4_t ix, ix1;
    int j;
    bit neg;
    for (int n = 0; n < NR; n++) begin
      r_re[n] = '0; r_im[n] = '0; h1_re[n][0] = '0; h1_im[n][0] = '0;
      for (int c = 0; c < K; c++) begin h_re[n][c] = '0; h_im[n][c] = '0; end
    end
    for (int c = 0; c < K; c++) idx[c] = 2'(c);
    idx1[0] = 2'd3;
    sigma2 = (W-1)'(5000);
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < NV; v++) begin
      for (int n = 0; n < 4; n++) begin
        rr[n] = 0; ri[n] = 0;
        for (int c = 0; c < 4; c++) begin
          hr[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
          hi[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
        end
      end
      for (int c = 0; c < 4; c++) begin
        bit sn;
        sn = $urandom_range(0, 1);
        for (int n = 0; n < 4; n++) begin
          rr[n] += sn ? -hr[n][c] : hr[n][c];
          ri[n] += sn ? -hi[n][c] : hi[n][c];
        end
      end
      for (int n = 0; n < 4; n++) begin
        rr[n] = rsat(rr[n] + longint'(gauss() * 2.0 ** (W - 6)), W);
        ri[n] = rsat(ri[n] + longint'(gauss() * 2.0 ** (W - 6)), W);
        r_re[n] <= W'(rr[n]); r_im[n] <= W'(ri[n]);
        h1_re[n][0] <= W'(hr[n][0]); h1_im[n][0] <= W'(hi[n][0]);
        for (int c = 0; c < K; c++) begin h_re[n][c] <= W'(hr[n][c]); h_im[n][c] <= W'(hi[n][c]); end
      end
      for (int c = 0; c < 4; c++) ix[c] = c;
      h1r = hr; h1i = hi; r1r = rr; r1i = ri; ix1[0] = 3;
      // K = 4
      gram(hr, hi, NR, K, 5000, W, GSH, gr, gi);
      chol(gr, gi, K, W, pr, pi, d);
      trinv(pr, pi, K, W, PSH, xr, xi);
      j = qmin(xr, xi, d, K, W, PSH, q);
      exp_q.push_back(ix[j]);
      neg = detect(xr, xi, d, j, NR, K, W, PSH, hr, hi, rr, ri, ix);
      exp_q.push_back(neg);
      for (int n = 0; n < NR; n++) begin
        exp_q.push_back(rr[n]); exp_q.push_back(ri[n]);
        for (int c = 0; c < K - 1; c++) begin exp_q.push_back(hr[n][c]); exp_q.push_back(hi[n][c]); end
      end
      for (int c = 0; c < K - 1; c++) exp_q.push_back(ix[c]);
      // K = 1
      gram(h1r, h1i, NR, 1, 5000, W, GSH, gr, gi);
      chol(gr, gi, 1, W, pr, pi, d);
      trinv(pr, pi, 1, W, PSH, xr, xi);
      j = qmin(xr, xi, d, 1, W, PSH, q);
      neg = detect(xr, xi, d, j, NR, 1, W, PSH, h1r, h1i, r1r, r1i, ix1);
      exp1_q.push_back(neg);
      for (int n = 0; n < NR; n++) begin exp1_q.push_back(r1r[n]); exp1_q.push_back(r1i[n]); end
      t_in.push_back(cyc); t_in1.push_back(cyc);
      in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (K + 8) @(posedge clk);
    checks += 2;
    if (got != NV || got1 != NV) begin failures++; $display("got %0d and %0d of %0d results", got, got1, NV); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    longint e, e2;
    int ti;
    ti = t_in.pop_front();
    got++;
    checks++;
    if (cyc - ti - 1 != K + 4) begin failures++; if (failures < 10) $display("latency %0d", cyc - ti - 1); end
    e = exp_q.pop_front();
    checks++;
    if (longint'(sym_idx) != e) failures++;
    e = exp_q.pop_front();
    checks++;
    if (longint'(sym_neg) != e) begin failures++; if (failures < 10) $display("decision got %0d exp %0d", sym_neg, e); end
    for (int n = 0; n < NR; n++) begin
      e = exp_q.pop_front(); e2 = exp_q.pop_front();
      checks++;
      if (longint'(r_re_o[n]) != e || longint'(r_im_o[n]) != e2) failures++;
      for (int c = 0; c < K - 1; c++) begin
        e = exp_q.pop_front(); e2 = exp_q.pop_front();
        checks++;
        if (longint'(h_re_o[n][c]) != e || longint'(h_im_o[n][c]) != e2) failures++;
      end
    end
    for (int c = 0; c < K - 1; c++) begin
      e = exp_q.pop_front();
      checks++;
      if (longint'(idx_o[c]) != e) failures++;
    end
  end

  always @(posedge clk) if (out_valid1) begin
    longint e, e2;
    int ti;
    ti = t_in1.pop_front();
    got1++;
    checks++;
    if (cyc - ti - 1 != 1 + 4) begin failures++; if (failures < 10) $display("K=1 latency %0d", cyc - ti - 1); end
    checks++;
    if (sym_idx1 != 2'd3) failures++;
    e = exp1_q.pop_front();
    checks++;
    if (longint'(sym_neg1) != e) begin failures++; if (failures < 10) $display("K=1 decision got %0d exp %0d", sym_neg1, e); end
    for (int n = 0; n < NR; n++) begin
      e = exp1_q.pop_front(); e2 = exp1_q.pop_front();
      checks++;
      if (longint'(r1_re_o[n]) != e || longint'(r1_im_o[n]) != e2) failures++;
    end
  end
endmodule
