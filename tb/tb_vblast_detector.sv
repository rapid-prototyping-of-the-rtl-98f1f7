// tb_vblast_detector: end-to-end test of the MMSE-VBLAST detector at its
// default size (4x4, 24-bit). Frames of random BPSK vectors pass through
// random Rayleigh channels with complex Gaussian noise at several SNRs. Per
// frame the 3-sigma AGC factor lambda = (2^W-1)/(6*sqrt(1/2+sigma_n^2/2)) and
// the scaled noise variance are computed here, as the host would.
// Checks:
//   - decisions and detection order equal the bit-accurate reference model;
//   - latency (28 cycles) and one vector per cycle while a frame streams;
//   - the fixed-point decisions agree with a double-precision MMSE-VBLAST on
//     at least 97% of symbols, and the error rate against the transmitted
//     symbols falls with SNR;
//   - every mechanism happened: back-to-back input, frame (lambda/sigma^2)
//     change, each channel detected first, both symbol values, AGC clipping.
module tb_vblast_detector;
  import vblast_ref_pkg::*;
  localparam int N = 4, W = 24, LW = 18, LF = 12, GSH = W - 1 + 2, PSH = W - 2;
  localparam int LAT = 28, NF = 5, NV = 300;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic [LW-1:0] lambda;
  logic [W-2:0] sigma2;
  logic signed [W-1:0] h_re [N][N], h_im [N][N], r_re [N], r_im [N];
  logic [N-1:0] sym_neg;
  logic [$clog2(N)-1:0] order [N];

  int checks = 0, failures = 0, cyc = 0, t_in[$], got = 0;
  int first_hit[N], n_neg = 0, n_pos = 0, n_b2b = 0, n_frames = 0, n_clip = 0;
  int agree = 0, total = 0, err_fx[NF], err_id[NF];
  longint exp_q[$];
  int frame_q[$];
  logic prev_in = 0;

  vblast_detector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (in_valid && prev_in) n_b2b++;
    prev_in <= in_valid;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint to_raw(real x);
    return rsat(longint'(x * 2.0 ** (W - 4)), W);
  endfunction

  initial begin
    real snr_db [NF] = '{0.0, 5.0, 10.0, 15.0, 20.0};
    for (int c = 0; c < N; c++) first_hit[c] = 0;
    for (int f = 0; f < NF; f++) begin err_fx[f] = 0; err_id[f] = 0; end
    for (int n = 0; n < N; n++) begin
      r_re[n] = '0; r_im[n] = '0;
      for (int c = 0; c < N; c++) begin h_re[n][c] = '0; h_im[n][c] = '0; end
    end
    lambda = '0; sigma2 = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++) begin
      real s2, lam, lam_raw;
      longint lam_q, s2_q;
      s2      = 10.0 ** (-snr_db[f] / 10.0);
      lam     = (2.0 ** W - 1.0) / (6.0 * $sqrt(0.5 + s2 / 2.0));
      lam_raw = lam / 2.0 ** (W - 4);
      lam_q   = longint'(lam_raw * 2.0 ** LF);
      s2_q    = longint'(s2 * lam * lam / 2.0 ** GSH);
      lambda <= LW'(lam_q);
      sigma2 <= (W-1)'(s2_q);
      n_frames++;
      @(posedge clk);
      for (int v = 0; v < NV; v++) begin
        real hf_r[4][4], hf_i[4][4], rf_r[4], rf_i[4];
        m4_t hq_r, hq_i;
        v4_t rq_r, rq_i;
        bit s[4], nfx[4], nid[4];
        i4_t ord;
        for (int c = 0; c < N; c++) s[c] = $urandom_range(0, 1);
        for (int n = 0; n < 4; n++) begin
          rf_r[n] = 0.0; rf_i[n] = 0.0;
          for (int c = 0; c < 4; c++) begin hf_r[n][c] = 0.0; hf_i[n][c] = 0.0; end
        end
        for (int n = 0; n < N; n++) begin
          for (int c = 0; c < N; c++) begin
            hf_r[n][c] = gauss() * $sqrt(1.0 / (2.0 * N));
            hf_i[n][c] = gauss() * $sqrt(1.0 / (2.0 * N));
          end
          rf_r[n] = gauss() * $sqrt(s2 / 2.0);
          rf_i[n] = gauss() * $sqrt(s2 / 2.0);
          for (int c = 0; c < N; c++) begin
            rf_r[n] += s[c] ? -hf_r[n][c] : hf_r[n][c];
            rf_i[n] += s[c] ? -hf_i[n][c] : hf_i[n][c];
          end
        end
        // raw input samples and their AGC-scaled values
        for (int n = 0; n < 4; n++) begin
          rq_r[n] = 0; rq_i[n] = 0;
          for (int c = 0; c < 4; c++) begin hq_r[n][c] = 0; hq_i[n][c] = 0; end
        end
        for (int n = 0; n < N; n++) begin
          longint a, b;
          for (int c = 0; c < N; c++) begin
            a = to_raw(hf_r[n][c]); b = to_raw(hf_i[n][c]);
            h_re[n][c] <= W'(a); h_im[n][c] <= W'(b);
            hq_r[n][c] = agc(a, lam_q, LF, W); hq_i[n][c] = agc(b, lam_q, LF, W);
          end
          a = to_raw(rf_r[n]); b = to_raw(rf_i[n]);
          r_re[n] <= W'(a); r_im[n] <= W'(b);
          rq_r[n] = agc(a, lam_q, LF, W); rq_i[n] = agc(b, lam_q, LF, W);
          if (rq_r[n] == (longint'(1) << (W - 1)) - 1 || rq_r[n] == -(longint'(1) << (W - 1)) ||
              rq_i[n] == (longint'(1) << (W - 1)) - 1 || rq_i[n] == -(longint'(1) << (W - 1)))
            n_clip++;
        end
        detector(hq_r, hq_i, rq_r, rq_i, N, s2_q, W, GSH, PSH, nfx, ord);
        ideal_detect(hf_r, hf_i, rf_r, rf_i, N, s2, nid);
        for (int c = 0; c < N; c++) begin
          exp_q.push_back(nfx[c]);
          total++;
          if (nfx[c] == nid[c]) agree++;
          if (nfx[c] != s[c]) err_fx[f]++;
          if (nid[c] != s[c]) err_id[f]++;
        end
        for (int c = 0; c < N; c++) exp_q.push_back(ord[c]);
        t_in.push_back(cyc);
        in_valid <= 1;
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (LAT + 4) @(posedge clk);   // drain before the per-frame values change
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != NF * NV) begin failures++; $display("got %0d of %0d results", got, NF * NV); end
    for (int f = 0; f < NF; f++)
      $display("SNR %4.1f dB: fixed-point errors %0d, double-precision errors %0d of %0d symbols",
               snr_db[f], err_fx[f], err_id[f], NV * N);
    $display("agreement with double precision: %0d of %0d", agree, total);
    checks++;
    if (agree * 100 < total * 97) begin failures++; $display("too little agreement"); end
    checks++;
    if (!(err_fx[NF-1] < err_fx[0])) begin failures++; $display("error rate does not fall with SNR"); end
    $display("mechanisms: back-to-back %0d, frames %0d, AGC clips %0d, +1 %0d, -1 %0d",
             n_b2b, n_frames, n_clip, n_pos, n_neg);
    for (int c = 0; c < N; c++) $display("channel %0d detected first %0d times", c, first_hit[c]);
    checks += 5;
    if (n_b2b == 0 || n_frames < 2 || n_clip == 0 || n_pos == 0 || n_neg == 0) begin
      failures++; $display("a mechanism never happened");
    end
    for (int c = 0; c < N; c++) begin
      checks++;
      if (first_hit[c] == 0) begin failures++; $display("channel %0d never detected first", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    longint e;
    int ti;
    ti = t_in.pop_front();
    got++;
    checks++;
    if (cyc - ti - 1 != LAT) begin
      failures++;
      if (failures < 10) $display("latency %0d", cyc - ti - 1);
    end
    for (int c = 0; c < N; c++) begin
      e = exp_q.pop_front();
      checks++;
      if (sym_neg[c]) n_neg++; else n_pos++;
      if (longint'(sym_neg[c]) != e) begin
        failures++;
        if (failures < 10) $display("symbol %0d got %0d exp %0d", c, sym_neg[c], e);
      end
    end
    first_hit[order[0]]++;
    for (int c = 0; c < N; c++) begin
      e = exp_q.pop_front();
      checks++;
      if (longint'(order[c]) != e) begin
        failures++;
        if (failures < 10) $display("order[%0d] got %0d exp %0d", c, order[c], e);
      end
    end
  end
endmodule
