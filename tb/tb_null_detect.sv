// tb_null_detect: self-checking test of null_detect. Random BPSK vectors are
// sent through random channels with noise; the reference chain supplies X, D
// and the selected index. The decided symbol, its channel number, the
// cancelled r and the reduced H and channel list are compared with the
// reference model. Both symbol values and every removal position must occur.
module tb_null_detect;
  import vblast_ref_pkg::*;
  localparam int NR = 4, K = 4, W = 24, PSH = W - 2, GSH = W + 1, NV = 400;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] x_re [K][K], x_im [K][K], dlt [K];
  logic [1:0] jmin;
  logic signed [W-1:0] h_re [NR][K], h_im [NR][K], r_re [NR], r_im [NR];
  logic [1:0] idx [K];
  logic sym_neg;
  logic [1:0] sym_idx;
  logic signed [W-1:0] h_re_o [NR][K-1], h_im_o [NR][K-1], r_re_o [NR], r_im_o [NR];
  logic [1:0] idx_o [K-1];
  int checks = 0, failures = 0, cyc = 0, t_in[$], got = 0, nneg = 0, npos = 0, jhit[K];
  longint exp_q[$];

  null_detect #(.NR(NR), .K(K), .W(W), .PSH(PSH)) dut (.*);

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
    m4_t hr, hi, gr, gi, pr, pi, xr, xi;
    v4_t d, q, rr, ri;
    i4_t ix;
    int j;
    bit neg;
    for (int a = 0; a < K; a++) begin
      jhit[a] = 0; dlt[a] = '0; idx[a] = '0;
      for (int b = 0; b < K; b++) begin x_re[a][b] = '0; x_im[a][b] = '0; end
    end
    for (int n = 0; n < NR; n++) begin
      r_re[n] = '0; r_im[n] = '0;
      for (int c = 0; c < K; c++) begin h_re[n][c] = '0; h_im[n][c] = '0; end
    end
    jmin = '0;
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
      end
      gram(hr, hi, 4, K, 64, W, GSH, gr, gi);
      chol(gr, gi, K, W, pr, pi, d);
      trinv(pr, pi, K, W, PSH, xr, xi);
      j = qmin(xr, xi, d, K, W, PSH, q);
      for (int c = 0; c < 4; c++) ix[c] = (c + v) % 4;
      // drive the inputs before detect() updates hr/hi/rr/ri/ix in place
      jmin <= 2'(j);
      for (int a = 0; a < K; a++) begin
        dlt[a] <= W'(d[a]);
        idx[a] <= 2'(ix[a]);
        for (int b = 0; b < K; b++) begin x_re[a][b] <= W'(xr[a][b]); x_im[a][b] <= W'(xi[a][b]); end
      end
      for (int n = 0; n < NR; n++) begin
        r_re[n] <= W'(rr[n]); r_im[n] <= W'(ri[n]);
        for (int c = 0; c < K; c++) begin h_re[n][c] <= W'(hr[n][c]); h_im[n][c] <= W'(hi[n][c]); end
      end
      exp_q.push_back(ix[j]);
      exp_q.push_back(j);
      neg = detect(xr, xi, d, j, NR, K, W, PSH, hr, hi, rr, ri, ix);
      exp_q.push_back(neg);
      for (int n = 0; n < NR; n++) begin
        exp_q.push_back(rr[n]); exp_q.push_back(ri[n]);
        for (int c = 0; c < K - 1; c++) begin exp_q.push_back(hr[n][c]); exp_q.push_back(hi[n][c]); end
      end
      for (int c = 0; c < K - 1; c++) exp_q.push_back(ix[c]);
      t_in.push_back(cyc);
      in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != NV) begin failures++; $display("got %0d of %0d results", got, NV); end
    checks += 2;
    if (nneg == 0 || npos == 0) begin failures++; $display("only one symbol value seen"); end
    for (int a = 0; a < K; a++) begin
      checks++;
      if (jhit[a] == 0) begin failures++; $display("column %0d never removed", a); end
    end
    $display("symbols: %0d positive, %0d negative", npos, nneg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    longint e, e2;
    int ti;
    ti = t_in.pop_front();
    got++;
    checks++;
    if (cyc - ti - 1 != 1) begin failures++; $display("latency %0d", cyc - ti - 1); end
    e = exp_q.pop_front();
    checks++;
    if (longint'(sym_idx) != e) failures++;
    e = exp_q.pop_front();
    jhit[e]++;
    e = exp_q.pop_front();
    checks++;
    if (sym_neg) nneg++; else npos++;
    if (longint'(sym_neg) != e) begin
      failures++;
      if (failures < 10) $display("decision got %0d exp %0d", sym_neg, e);
    end
    for (int n = 0; n < NR; n++) begin
      e = exp_q.pop_front(); e2 = exp_q.pop_front();
      checks++;
      if (longint'(r_re_o[n]) != e || longint'(r_im_o[n]) != e2) begin
        failures++;
        if (failures < 10) $display("r[%0d] got %0d,%0d exp %0d,%0d", n, r_re_o[n], r_im_o[n], e, e2);
      end
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
endmodule
