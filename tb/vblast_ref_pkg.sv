// vblast_ref_pkg: behavioural reference model of the MMSE-VBLAST detector,
// used by the testbenches to predict the RTL's outputs bit for bit.
//
// It is written independently of the RTL from the arithmetic rules the RTL
// documents: every sum of products is taken at full precision, shifted right
// arithmetically and saturated to W bits. Matrices are held as separate real
// and imaginary 4x4 arrays of 64-bit integers; k is the number of active
// channels and nr the number of receive antennas (both at most 4).
// It also holds a double-precision MMSE-VBLAST (ideal_detect) used to judge
// the fixed-point detector's error rate.
package vblast_ref_pkg;

  typedef longint m4_t [4][4];
  typedef longint v4_t [4];
  typedef int     i4_t [4];

  function automatic longint rsat(longint x, int w);
    longint lim;
    lim = longint'(1) << (w - 1);
    if (x >= lim) return lim - 1;
    if (x < -lim) return -lim;
    return x;
  endfunction

  function automatic longint rq(longint x, int s, int w);
    return rsat(x >>> s, w);
  endfunction

  function automatic longint rshift(longint x, int s);
    if (s > 62) return x < 0 ? -1 : 0;
    return (s >= 0) ? (x >>> s) : (x <<< -s);
  endfunction

  // Leading-one normalisation: shift that brings m > 0 into [2^(w-2), 2^(w-1)).
  function automatic int rnorm(longint m, int w);
    int s;
    if (m <= 0) return 0;
    s = 0;
    while (rshift(m, s) >= (longint'(1) << (w - 1))) s++;
    while (rshift(m, s) < (longint'(1) << (w - 2))) s--;
    return s;
  endfunction

  // G = H^H H (shifted by gsh) + sigma2 on the diagonal, normalised so that
  // the largest diagonal entry fills the word; full Hermitian.
  function automatic void gram(input m4_t hr, input m4_t hi, input int nr, input int k,
                               input longint sigma2, input int w, input int gsh,
                               output m4_t gr, output m4_t gi);
    m4_t fr, fi;
    longint dmax;
    int ns;
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin gr[a][b] = 0; gi[a][b] = 0; end
    dmax = 0;
    for (int a = 0; a < k; a++) begin
      for (int b = 0; b <= a; b++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int n = 0; n < nr; n++) begin
          // conj(h_na) * h_nb
          sr += hr[n][a] * hr[n][b] + hi[n][a] * hi[n][b];
          si += hr[n][a] * hi[n][b] - hi[n][a] * hr[n][b];
        end
        fr[a][b] = sr >>> gsh;
        fi[a][b] = si >>> gsh;
      end
      fr[a][a] += sigma2;
      fi[a][a] = 0;
      if (fr[a][a] > dmax) dmax = fr[a][a];
    end
    ns = rnorm(dmax, w);
    for (int a = 0; a < k; a++)
      for (int b = 0; b <= a; b++) begin
        gr[a][b] = rsat(rshift(fr[a][b], ns), w);
        gi[a][b] = rsat(rshift(fi[a][b], ns), w);
        gr[b][a] = gr[a][b];
        gi[b][a] = rsat(-gi[a][b], w);
      end
  endfunction

  // Fraction-free Cholesky with a normalised Schur complement per stage:
  // lower P and the pivot products D on one common scale.
  function automatic void chol(input m4_t gr, input m4_t gi, input int k, input int w,
                               output m4_t pr, output m4_t pi, output v4_t d);
    m4_t yr, yi;
    v4_t dm, de;
    longint sm, se, emax;
    for (int a = 0; a < 4; a++) begin
      d[a] = 0; dm[a] = 0; de[a] = 0;
      for (int b = 0; b < 4; b++) begin
        yr[a][b] = (a >= b && a < k) ? gr[a][b] : 0;
        yi[a][b] = (a >  b && a < k) ? gi[a][b] : 0;
      end
    end
    // running scale d = sm * 2^se, starts at 1
    sm = longint'(1) << (w - 2);
    se = -(w - 2);
    for (int s = 0; s < k; s++) begin
      m4_t er, ei;
      longint dmax, prod;
      int t, sd;
      prod  = yr[s][s] * sm;
      sd    = rnorm(prod, w);
      dm[s] = rsat(rshift(prod, sd), w);
      de[s] = se + sd;
      dmax = 0;
      for (int i = s + 1; i < k; i++) begin
        for (int j = s + 1; j <= i; j++) begin
          // Y(s,s)*Y(i,j) - Y(i,s)*conj(Y(j,s))
          er[i][j] = yr[s][s] * yr[i][j] - (yr[i][s] * yr[j][s] + yi[i][s] * yi[j][s]);
          ei[i][j] = yr[s][s] * yi[i][j] - (yi[i][s] * yr[j][s] - yr[i][s] * yi[j][s]);
        end
        if (er[i][i] > dmax) dmax = er[i][i];
      end
      t = rnorm(dmax, w);
      for (int i = s + 1; i < k; i++)
        for (int j = s + 1; j <= i; j++) begin
          yr[i][j] = rsat(rshift(er[i][j], t), w);
          yi[i][j] = (i == j) ? 0 : rsat(rshift(ei[i][j], t), w);
        end
      sm = dm[s];
      se = de[s] - t;
    end
    emax = de[0];
    for (int a = 1; a < k; a++) if (de[a] > emax) emax = de[a];
    for (int a = 0; a < k; a++) d[a] = rsat(rshift(dm[a], int'(emax - de[a])), w);
    pr = yr; pi = yi;
  endfunction

  // X = (prod of P diagonal) * P^-1, column by column.
  function automatic void trinv(input m4_t pr, input m4_t pi, input int k, input int w,
                                input int psh, output m4_t xr, output m4_t xi);
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin xr[a][b] = 0; xi[a][b] = 0; end
    for (int j = 0; j < k; j++) begin
      v4_t vr, vi;
      for (int a = 0; a < 4; a++) begin vr[a] = 0; vi[a] = 0; end
      vr[j] = longint'(1) << (w - 5);   // unity of the inverse
      for (int i = j + 1; i < k; i++) begin
        longint ar, ai;
        ar = 0; ai = 0;
        for (int m = j; m < i; m++) begin
          ar += pr[i][m] * vr[m] - pi[i][m] * vi[m];
          ai += pr[i][m] * vi[m] + pi[i][m] * vr[m];
        end
        for (int m = j; m < i; m++) begin
          vr[m] = rq(pr[i][i] * vr[m], psh, w);
          vi[m] = rq(pr[i][i] * vi[m], psh, w);
        end
        vr[i] = rq(-ar, psh, w);
        vi[i] = rq(-ai, psh, w);
      end
      for (int m = 0; m < j; m++)
        for (int a = j; a < k; a++) begin
          vr[a] = rq(pr[m][m] * vr[a], psh, w);
          vi[a] = rq(pr[m][m] * vi[a], psh, w);
        end
      for (int a = j; a < k; a++) begin xr[a][j] = vr[a]; xi[a][j] = vi[a]; end
    end
  endfunction

  // Diagonal of Q = X^H diag(D) X and its argmin (lowest index on a tie).
  function automatic int qmin(input m4_t xr, input m4_t xi, input v4_t d, input int k,
                              input int w, input int psh, output v4_t qd);
    int best;
    for (int j = 0; j < 4; j++) qd[j] = 0;
    for (int j = 0; j < k; j++)
      for (int m = j; m < k; m++)
        qd[j] += (d[m] * ((xr[m][j] * xr[m][j] + xi[m][j] * xi[m][j]) >>> psh)) >>> psh;
    best = 0;
    for (int j = 1; j < k; j++) if (qd[j] < qd[best]) best = j;
    return best;
  endfunction

  // Nulling, sign decision, cancellation and column removal for channel j.
  function automatic bit detect(input m4_t xr, input m4_t xi, input v4_t d, input int j,
                                input int nr, input int k, input int w, input int psh,
                                inout m4_t hr, inout m4_t hi, inout v4_t rr, inout v4_t ri,
                                inout i4_t idx);
    v4_t qr, qi, wr, wi;
    longint num, den;
    bit neg;
    for (int a = 0; a < k; a++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int m = 0; m < k; m++) begin
        longint tr, ti;
        tr = rq(d[m] * xr[m][a], psh, w);
        ti = rq(d[m] * xi[m][a], psh, w);
        // conj(x_mj) * t
        sr += xr[m][j] * tr + xi[m][j] * ti;
        si += xr[m][j] * ti - xi[m][j] * tr;
      end
      qr[a] = rq(sr, psh, w); qi[a] = rq(si, psh, w);
    end
    for (int n = 0; n < nr; n++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int a = 0; a < k; a++) begin
        // q_a * conj(h_na)
        sr += qr[a] * hr[n][a] + qi[a] * hi[n][a];
        si += qi[a] * hr[n][a] - qr[a] * hi[n][a];
      end
      wr[n] = rq(sr, psh, w); wi[n] = rq(si, psh, w);
    end
    num = 0; den = 0;
    for (int n = 0; n < nr; n++) begin
      num += wr[n] * rr[n] - wi[n] * ri[n];
      den += wr[n] * hr[n][j] - wi[n] * hi[n][j];
    end
    neg = (num < 0) ^ (den < 0);
    for (int n = 0; n < nr; n++) begin
      rr[n] = rsat(neg ? rr[n] + hr[n][j] : rr[n] - hr[n][j], w);
      ri[n] = rsat(neg ? ri[n] + hi[n][j] : ri[n] - hi[n][j], w);
    end
    for (int c = j; c < k - 1; c++) begin
      idx[c] = idx[c+1];
      for (int n = 0; n < nr; n++) begin hr[n][c] = hr[n][c+1]; hi[n][c] = hi[n][c+1]; end
    end
    return neg;
  endfunction

  // AGC scaling of one value.
  function automatic longint agc(longint x, longint lambda, int lf, int w);
    return rq(x * lambda, lf, w);
  endfunction

  // Whole fixed-point detector on already scaled H and r.
  function automatic void detector(input m4_t hr_in, input m4_t hi_in, input v4_t rr_in,
                                   input v4_t ri_in, input int n, input longint sigma2,
                                   input int w, input int gsh, input int psh,
                                   output bit neg[4], output i4_t order);
    m4_t hr, hi, gr, gi, pr, pi, xr, xi;
    v4_t rr, ri, d, qd;
    i4_t idx;
    hr = hr_in; hi = hi_in; rr = rr_in; ri = ri_in;
    for (int c = 0; c < 4; c++) begin idx[c] = c; neg[c] = 0; order[c] = 0; end
    for (int lvl = 0; lvl < n; lvl++) begin
      int k, j, ch;
      bit s;
      k = n - lvl;
      gram(hr, hi, n, k, sigma2, w, gsh, gr, gi);
      chol(gr, gi, k, w, pr, pi, d);
      trinv(pr, pi, k, w, psh, xr, xi);
      j = qmin(xr, xi, d, k, w, psh, qd);
      ch = idx[j];
      s = detect(xr, xi, d, j, n, k, w, psh, hr, hi, rr, ri, idx);
      neg[ch] = s;
      order[lvl] = ch;
    end
  endfunction

  // Double-precision MMSE-VBLAST (explicit inverse by Gauss-Jordan) for BPSK.
  function automatic void ideal_detect(input real hr_in[4][4], input real hi_in[4][4],
                                       input real rr_in[4], input real ri_in[4], input int n,
                                       input real s2, output bit neg[4]);
    real hr[4][4], hi[4][4], rr[4], ri[4];
    int  idx[4];
    hr = hr_in; hi = hi_in; rr = rr_in; ri = ri_in;
    for (int c = 0; c < 4; c++) begin idx[c] = c; neg[c] = 0; end
    for (int lvl = 0; lvl < n; lvl++) begin
      int  k, j;
      real ar[4][8], ai[4][8];
      real best, num, den, wr, wi;
      bit  s;
      k = n - lvl;
      // [G | I]
      for (int a = 0; a < k; a++)
        for (int b = 0; b < 2 * k; b++) begin ar[a][b] = 0.0; ai[a][b] = 0.0; end
      for (int a = 0; a < k; a++) begin
        for (int b = 0; b < k; b++)
          for (int m = 0; m < n; m++) begin
            ar[a][b] += hr[m][a] * hr[m][b] + hi[m][a] * hi[m][b];
            ai[a][b] += hr[m][a] * hi[m][b] - hi[m][a] * hr[m][b];
          end
        ar[a][a] += s2;
        ar[a][k + a] = 1.0;
      end
      for (int c = 0; c < k; c++) begin
        real pr_, pi_, den2;
        pr_ = ar[c][c]; pi_ = ai[c][c]; den2 = pr_ * pr_ + pi_ * pi_;
        for (int b = 0; b < 2 * k; b++) begin
          real tr, ti;
          tr = (ar[c][b] * pr_ + ai[c][b] * pi_) / den2;
          ti = (ai[c][b] * pr_ - ar[c][b] * pi_) / den2;
          ar[c][b] = tr; ai[c][b] = ti;
        end
        for (int a = 0; a < k; a++) if (a != c) begin
          real fr, fi;
          fr = ar[a][c]; fi = ai[a][c];
          for (int b = 0; b < 2 * k; b++) begin
            ar[a][b] -= fr * ar[c][b] - fi * ai[c][b];
            ai[a][b] -= fr * ai[c][b] + fi * ar[c][b];
          end
        end
      end
      j = 0; best = ar[0][k];
      for (int a = 1; a < k; a++) if (ar[a][k + a] < best) begin best = ar[a][k + a]; j = a; end
      num = 0.0; den = 0.0;
      for (int m = 0; m < n; m++) begin
        wr = 0.0; wi = 0.0;
        for (int a = 0; a < k; a++) begin
          wr += ar[j][k + a] * hr[m][a] + ai[j][k + a] * hi[m][a];
          wi += ai[j][k + a] * hr[m][a] - ar[j][k + a] * hi[m][a];
        end
        num += wr * rr[m] - wi * ri[m];
        den += wr * hr[m][j] - wi * hi[m][j];
      end
      s = (num < 0.0) ^ (den < 0.0);
      neg[idx[j]] = s;
      for (int m = 0; m < n; m++) begin
        rr[m] = s ? rr[m] + hr[m][j] : rr[m] - hr[m][j];
        ri[m] = s ? ri[m] + hi[m][j] : ri[m] - hi[m][j];
      end
      for (int c = j; c < k - 1; c++) begin
        idx[c] = idx[c + 1];
        for (int m = 0; m < n; m++) begin hr[m][c] = hr[m][c + 1]; hi[m][c] = hi[m][c + 1]; end
      end
    end
  endfunction

  // Approximately normal random number (sum of 12 uniforms), unit variance.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

endpackage
