// tb_gram_unit: self-checking test of gram_unit (G = H^H H + sigma^2 I).
// Streams random 4x4 channel matrices back to back, one per cycle, and compares
// every G with the reference model; also checks the one-cycle latency.
module tb_gram_unit;
  import vblast_ref_pkg::*;
  localparam int NR = 4, K = 4, W = 24, GSH = W - 1 + 2, NV = 200;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] h_re [NR][K], h_im [NR][K], g_re [K][K], g_im [K][K];
  logic [W-2:0] sigma2;
  int checks = 0, failures = 0, cyc = 0, t_in[$], sent = 0, got = 0;
  longint exp_q[$];

  gram_unit #(.NR(NR), .K(K), .W(W), .GSH(GSH)) dut (.*);

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
    m4_t hr, hi, gr, gi;
    sigma2 = W'($urandom_range(0, 1 << 18));
    for (int n = 0; n < NR; n++) for (int c = 0; c < K; c++) begin h_re[n][c] = '0; h_im[n][c] = '0; end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < NV; v++) begin
      for (int n = 0; n < 4; n++) for (int c = 0; c < 4; c++) begin
        // mostly moderate values, some at full scale to exercise saturation
        if (v % 10 == 9) begin
          hr[n][c] = (c % 2) ? -(longint'(1) << (W - 1)) : (longint'(1) << (W - 1)) - 1;
          hi[n][c] = -(longint'(1) << (W - 1));
        end else begin
          hr[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 3)), W);
          hi[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 3)), W);
        end
        h_re[n][c] <= W'(hr[n][c]);
        h_im[n][c] <= W'(hi[n][c]);
      end
      gram(hr, hi, NR, K, longint'(sigma2), W, GSH, gr, gi);
      for (int a = 0; a < K; a++) for (int b = 0; b < K; b++) begin
        exp_q.push_back(gr[a][b]); exp_q.push_back(gi[a][b]);
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
    for (int a = 0; a < K; a++) for (int b = 0; b < K; b++) begin
      er = exp_q.pop_front(); ei = exp_q.pop_front();
      checks++;
      if (longint'(g_re[a][b]) != er || longint'(g_im[a][b]) != ei) begin
        failures++;
        if (failures < 10) $display("G[%0d][%0d] got %0d,%0dj exp %0d,%0dj", a, b,
                                    g_re[a][b], g_im[a][b], er, ei);
      end
    end
  end
endmodule
