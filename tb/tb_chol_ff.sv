// tb_chol_ff: self-checking test of chol_ff, the division-free Cholesky.
// Feeds Hermitian positive definite G matrices (built from random channels)
// back to back and compares P and the pivot products D with the reference
// model; checks the K-cycle pipeline latency and one-per-cycle throughput.
module tb_chol_ff;
  import vblast_ref_pkg::*;
  localparam int K = 4, W = 24, PSH = W - 2, GSH = W + 1, NV = 300;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] g_re [K][K], g_im [K][K], p_re [K][K], p_im [K][K], dlt [K];
  int checks = 0, failures = 0, cyc = 0, t_in[$], got = 0;
  longint exp_q[$];

  chol_ff #(.K(K), .W(W)) dut (.*);

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
    m4_t hr, hi, gr, gi, pr, pi;
    v4_t d;
    for (int a = 0; a < K; a++) for (int b = 0; b < K; b++) begin g_re[a][b] = '0; g_im[a][b] = '0; end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < NV; v++) begin
      for (int n = 0; n < 4; n++) for (int c = 0; c < 4; c++) begin
        hr[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
        hi[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
      end
      gram(hr, hi, 4, K, longint'($urandom_range(0, 1 << 16)), W, GSH, gr, gi);
      chol(gr, gi, K, W, pr, pi, d);
      for (int a = 0; a < K; a++) begin
        for (int b = 0; b < K; b++) begin
          g_re[a][b] <= W'(gr[a][b]);
          g_im[a][b] <= W'(gi[a][b]);
          exp_q.push_back(pr[a][b]); exp_q.push_back(pi[a][b]);
        end
        exp_q.push_back(d[a]);
      end
      t_in.push_back(cyc);
      in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (K + 5) @(posedge clk);
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
    if (cyc - ti - 1 != K) begin failures++; $display("latency %0d", cyc - ti - 1); end
    for (int a = 0; a < K; a++) begin
      for (int b = 0; b < K; b++) begin
        er = exp_q.pop_front(); ei = exp_q.pop_front();
        checks++;
        if (longint'(p_re[a][b]) != er || longint'(p_im[a][b]) != ei) begin
          failures++;
          if (failures < 10) $display("P[%0d][%0d] got %0d,%0dj exp %0d,%0dj", a, b,
                                      p_re[a][b], p_im[a][b], er, ei);
        end
      end
      er = exp_q.pop_front();
      checks++;
      if (longint'(dlt[a]) != er) begin
        failures++;
        if (failures < 10) $display("D[%0d] got %0d exp %0d", a, dlt[a], er);
      end
    end
  end
endmodule
