// tb_agc_scale: self-checking test of agc_scale. Random raw samples and scale
// factors (including values that clip) stream in one per cycle; the scaled
// H and r are compared with value*lambda/2^LF truncated and saturated to W
// bits, worked out here with real arithmetic, and the one-cycle latency is
// checked. Clipping at both rails must occur.
module tb_agc_scale;
  localparam int NR = 4, NT = 4, W = 24, LW = 18, LF = 12, NV = 300;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic [LW-1:0] lambda;
  logic signed [W-1:0] h_re [NR][NT], h_im [NR][NT], r_re [NR], r_im [NR];
  logic signed [W-1:0] hs_re [NR][NT], hs_im [NR][NT], rs_re [NR], rs_im [NR];
  int checks = 0, failures = 0, cyc = 0, t_in[$], got = 0, clip_hi = 0, clip_lo = 0;
  longint exp_q[$];

  agc_scale #(.NR(NR), .NT(NT), .W(W), .LW(LW), .LF(LF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output: floor(x * l / 2^LF), clipped to the W-bit range
  function automatic longint expect_val(longint x, longint l);
    real v, hi, lo;
    v  = $floor(real'(x) * real'(l) / 2.0 ** LF);
    hi = 2.0 ** (W - 1) - 1.0;
    lo = -(2.0 ** (W - 1));
    if (v > hi) v = hi;
    if (v < lo) v = lo;
    return longint'(v);
  endfunction

  function automatic longint rnd_sample();
    return longint'($urandom_range(0, (1 << W) - 1)) - (longint'(1) << (W - 1));
  endfunction

  initial begin
    longint l, x;
    for (int n = 0; n < NR; n++) begin
      r_re[n] = '0; r_im[n] = '0;
      for (int c = 0; c < NT; c++) begin h_re[n][c] = '0; h_im[n][c] = '0; end
    end
    lambda = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < NV; v++) begin
      l = (v % 3 == 0) ? longint'($urandom_range(0, (1 << LW) - 1)) : longint'($urandom_range(1 << (LF - 2), 1 << (LF + 1)));
      lambda <= LW'(l);
      for (int n = 0; n < NR; n++) begin
        for (int c = 0; c < NT; c++) begin
          x = rnd_sample(); h_re[n][c] <= W'(x); exp_q.push_back(expect_val(x, l));
          x = rnd_sample(); h_im[n][c] <= W'(x); exp_q.push_back(expect_val(x, l));
        end
        x = rnd_sample(); r_re[n] <= W'(x); exp_q.push_back(expect_val(x, l));
        x = rnd_sample(); r_im[n] <= W'(x); exp_q.push_back(expect_val(x, l));
      end
      t_in.push_back(cyc);
      in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks += 3;
    if (got != NV) begin failures++; $display("got %0d of %0d results", got, NV); end
    if (clip_hi == 0 || clip_lo == 0) begin failures++; $display("no clipping seen"); end
    $display("clipped high %0d, low %0d", clip_hi, clip_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void cmp(longint got_v, longint e, string what);
    checks++;
    if (got_v == (longint'(1) << (W - 1)) - 1) clip_hi++;
    if (got_v == -(longint'(1) << (W - 1))) clip_lo++;
    if (got_v != e) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got_v, e);
    end
  endfunction

  always @(posedge clk) if (out_valid) begin
    int ti;
    ti = t_in.pop_front();
    got++;
    checks++;
    if (cyc - ti - 1 != 1) begin failures++; $display("latency %0d", cyc - ti - 1); end
    for (int n = 0; n < NR; n++) begin
      for (int c = 0; c < NT; c++) begin
        cmp(longint'(hs_re[n][c]), exp_q.pop_front(), "H re");
        cmp(longint'(hs_im[n][c]), exp_q.pop_front(), "H im");
      end
      cmp(longint'(rs_re[n]), exp_q.pop_front(), "r re");
      cmp(longint'(rs_im[n]), exp_q.pop_front(), "r im");
    end
  end
endmodule
