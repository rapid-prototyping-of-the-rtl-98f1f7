// tb_tri_inv: self-checking test of tri_inv, the division-free triangular
// inverse. Factors from random channels are streamed one per cycle; X and the
// carried D are compared with the reference model, the one-cycle latency is
// checked, and on bidiagonal factors with unit entries, whose inverse is
// exactly representable, X*P is checked to be a multiple of the identity.
module tb_tri_inv;
  import vblast_ref_pkg::*;
  localparam int K = 4, W = 24, PSH = W - 2, GSH = W + 1, NV = 300;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] p_re [K][K], p_im [K][K], dlt_in [K];
  logic signed [W-1:0] x_re [K][K], x_im [K][K], dlt [K];
  int checks = 0, failures = 0, cyc = 0, t_in[$], got = 0;
  longint exp_q[$];

  tri_inv #(.K(K), .W(W), .PSH(PSH)) dut (.*);

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
    v4_t d;
    for (int a = 0; a < K; a++) begin
      dlt_in[a] = '0;
      for (int b = 0; b < K; b++) begin p_re[a][b] = '0; p_im[a][b] = '0; end
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < NV; v++) begin
      if (v < 20) begin
        // unit-diagonal factor with small entries: X must equal 2^PSH * P^-1 exactly
        // lower bidiagonal, sub-diagonal entries 0, +-1 or +-j (times 2^PSH)
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin
          pr[a][b] = (a == b) ? (longint'(1) << PSH) : 0;
          pi[a][b] = 0;
          if (a == b + 1) begin
            int u;
            u = $urandom_range(0, 4);
            if (u == 1) pr[a][b] = longint'(1) << PSH;
            if (u == 2) pr[a][b] = -(longint'(1) << PSH);
            if (u == 3) pi[a][b] = longint'(1) << PSH;
            if (u == 4) pi[a][b] = -(longint'(1) << PSH);
          end
        end
        for (int a = 0; a < 4; a++) d[a] = longint'($urandom_range(1, 1000));
      end else begin
        for (int n = 0; n < 4; n++) for (int c = 0; c < 4; c++) begin
          hr[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
          hi[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
        end
        gram(hr, hi, 4, K, longint'($urandom_range(0, 1 << 16)), W, GSH, gr, gi);
        chol(gr, gi, K, W, pr, pi, d);
      end
      trinv(pr, pi, K, W, PSH, xr, xi);
      if (v < 20) begin
        // independent check of the inverse: X * P = 2^(PSH + W - 5) * I exactly
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin
          longint sr, si;
          sr = 0; si = 0;
          for (int m = 0; m < 4; m++) begin
            sr += xr[a][m] * pr[m][b] - xi[a][m] * pi[m][b];
            si += xr[a][m] * pi[m][b] + xi[a][m] * pr[m][b];
          end
          checks++;
          if (sr != ((a == b) ? (longint'(1) << (PSH + W - 5)) : 0) || si != 0) begin
            failures++;
            if (failures < 10) $display("X*P[%0d][%0d] = %0d,%0dj", a, b, sr, si);
          end
        end
      end
      for (int a = 0; a < K; a++) begin
        dlt_in[a] <= W'(d[a]);
        exp_q.push_back(d[a]);
        for (int b = 0; b < K; b++) begin
          p_re[a][b] <= W'(pr[a][b]);
          p_im[a][b] <= W'(pi[a][b]);
          exp_q.push_back(xr[a][b]); exp_q.push_back(xi[a][b]);
        end
      end
      t_in.push_back(cyc);
      in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != NV) begin failures++; $display("got %0d of %0d results", got, NV); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    longint er, ei;
    int ti;
    ti = t_in.pop_front();
    got++;
    checks++;
    if (cyc - ti - 1 != 1) begin failures++; $display("latency %0d", cyc - ti - 1); end
    for (int a = 0; a < K; a++) begin
      er = exp_q.pop_front();
      checks++;
      if (longint'(dlt[a]) != er) failures++;
      for (int b = 0; b < K; b++) begin
        er = exp_q.pop_front(); ei = exp_q.pop_front();
        checks++;
        if (longint'(x_re[a][b]) != er || longint'(x_im[a][b]) != ei) begin
          failures++;
          if (failures < 10) $display("X[%0d][%0d] got %0d,%0dj exp %0d,%0dj", a, b,
                                      x_re[a][b], x_im[a][b], er, ei);
        end
      end
    end
  end
endmodule
