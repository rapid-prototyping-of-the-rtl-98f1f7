// tb_min_search: self-checking test of min_search. X and D come from the
// reference chain on random channels (plus a few hand-made cases with ties);
// the diagonal of Q, the selected index and the registered X and D are
// compared with the reference model, and every index must be selected at
// least once.
module tb_min_search;
  import vblast_ref_pkg::*;
  localparam int K = 4, W = 24, PSH = W - 2, GSH = W + 1, NV = 400;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] x_re_in [K][K], x_im_in [K][K], dlt_in [K];
  logic signed [W-1:0] x_re [K][K], x_im [K][K], dlt [K];
  logic signed [W+4:0] qd [K];
  logic [1:0] jmin;
  int checks = 0, failures = 0, cyc = 0, t_in[$], got = 0, hits[K];
  longint exp_q[$];

  min_search #(.K(K), .W(W), .PSH(PSH)) dut (.*);

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
    v4_t d, q;
    int j;
    for (int a = 0; a < K; a++) begin
      hits[a] = 0;
      dlt_in[a] = '0;
      for (int b = 0; b < K; b++) begin x_re_in[a][b] = '0; x_im_in[a][b] = '0; end
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < NV; v++) begin
      if (v < 8) begin
        // identity-like X with equal D: all Q(j,j) equal, the lowest index wins;
        // then one column made smaller
        for (int a = 0; a < 4; a++) begin
          d[a] = longint'(1) << PSH;
          for (int b = 0; b < 4; b++) begin
            xr[a][b] = (a == b) ? (longint'(1) << PSH) : 0;
            xi[a][b] = 0;
          end
        end
        if (v >= 4) xr[v-4][v-4] = longint'(1) << (PSH - 1);
      end else begin
        for (int n = 0; n < 4; n++) for (int c = 0; c < 4; c++) begin
          hr[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
          hi[n][c] = rsat(longint'(gauss() * 2.0 ** (W - 2) / 3.0), W);
        end
        gram(hr, hi, 4, K, longint'($urandom_range(0, 1 << 16)), W, GSH, gr, gi);
        chol(gr, gi, K, W, pr, pi, d);
        trinv(pr, pi, K, W, PSH, xr, xi);
      end
      j = qmin(xr, xi, d, K, W, PSH, q);
      if (v < 4) begin checks++; if (j != 0) failures++; end
      if (v >= 4 && v < 8) begin checks++; if (j != v - 4) failures++; end
      exp_q.push_back(j);
      for (int a = 0; a < K; a++) begin
        dlt_in[a] <= W'(d[a]);
        exp_q.push_back(d[a]);
        exp_q.push_back(q[a]);
        for (int b = 0; b < K; b++) begin
          x_re_in[a][b] <= W'(xr[a][b]);
          x_im_in[a][b] <= W'(xi[a][b]);
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
    for (int a = 0; a < K; a++) begin
      checks++;
      if (hits[a] == 0) begin failures++; $display("index %0d never selected", a); end
    end
    $display("selections per index: %0d %0d %0d %0d", hits[0], hits[1], hits[2], hits[3]);
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
    er = exp_q.pop_front();
    checks++;
    hits[jmin]++;
    if (longint'(jmin) != er) begin
      failures++;
      if (failures < 10) $display("jmin got %0d exp %0d", jmin, er);
    end
    for (int a = 0; a < K; a++) begin
      er = exp_q.pop_front();
      checks++;
      if (longint'(dlt[a]) != er) failures++;
      er = exp_q.pop_front();
      checks++;
      if (longint'(qd[a]) != er) begin
        failures++;
        if (failures < 10) $display("Q[%0d] got %0d exp %0d", a, qd[a], er);
      end
      for (int b = 0; b < K; b++) begin
        er = exp_q.pop_front(); ei = exp_q.pop_front();
        checks++;
        if (longint'(x_re[a][b]) != er || longint'(x_im[a][b]) != ei) failures++;
      end
    end
  end
endmodule
