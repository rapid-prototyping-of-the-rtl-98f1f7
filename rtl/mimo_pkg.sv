// mimo_pkg: shared fixed-point arithmetic for the MMSE-VBLAST detector.
//
// Every stored value in the detector is a W-bit two's-complement integer
// (W = 24 for the 4x4 detector, 16 for the 2x2). Arithmetic is done on 64-bit
// intermediates: a sum of products is formed at full precision, shifted right
// arithmetically (truncation toward minus infinity) by a fixed amount and then
// saturated back to W bits. Where a whole set of values shares one scale (the
// G matrix, each Schur complement of the Cholesky stages, the diagonal
// weights) the shift is chosen per set so that its largest value uses the
// full word (block floating point). The document fixes the word lengths; the
// truncate-then-saturate rule and the normalisation are this design's choice.
// The helpers below hold for W up to 30.
package mimo_pkg;

  // Complex intermediate value at full precision.
  typedef struct packed {
    longint re;
    longint im;
  } cl_t;

  // Saturate x to a signed w-bit range.
  function automatic longint sat(input longint x, input int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

  // Arithmetic shift right then saturate to w bits.
  function automatic longint qz(input longint x, input int s, input int w);
    return sat(x >>> s, w);
  endfunction

  // Normalisation shift for block floating point: the shift s such that
  // (m >>> s) has its leading one at bit w-2, i.e. lies in [2^(w-2), 2^(w-1)).
  // A negative s is a left shift. m <= 0 gives 0 (no normalisation).
  function automatic int nshift(input longint m, input int w);
    int msb;
    msb = -1;
    for (int b = 0; b < 63; b++) if (m[b]) msb = b;
    if (m <= 0) return 0;
    return msb - (w - 2);
  endfunction

  // Shift by s: right (arithmetic) for s >= 0, left for s < 0.
  function automatic longint shs(input longint x, input int s);
    if (s >= 63) return x >>> 63;
    if (s >= 0)  return x >>> s;
    return x <<< (-s);
  endfunction

  function automatic cl_t cmk(input longint re, input longint im);
    cl_t c;
    c.re = re;
    c.im = im;
    return c;
  endfunction

  function automatic cl_t cadd(input cl_t a, input cl_t b);
    return cmk(a.re + b.re, a.im + b.im);
  endfunction

  function automatic cl_t csub(input cl_t a, input cl_t b);
    return cmk(a.re - b.re, a.im - b.im);
  endfunction

  function automatic cl_t cmul(input cl_t a, input cl_t b);
    return cmk(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction

  function automatic cl_t cconj(input cl_t a);
    return cmk(a.re, -a.im);
  endfunction

  // Real scalar times complex.
  function automatic cl_t cscale(input longint k, input cl_t a);
    return cmk(k * a.re, k * a.im);
  endfunction

  function automatic cl_t cqz(input cl_t a, input int s, input int w);
    return cmk(qz(a.re, s, w), qz(a.im, s, w));
  endfunction

  function automatic cl_t csat(input cl_t a, input int w);
    return cmk(sat(a.re, w), sat(a.im, w));
  endfunction

endpackage
