// tb_ref_pkg: reference arithmetic for the testbenches, written with real
// numbers rather than bit manipulation so that it is independent of the RTL.
//
// A number format is described by fmt_t.  q() quantizes an exact real value
// the way every operator of the design must: truncation toward zero
// ($rtoi of the scaled value), saturation to the largest value / to -1, and
// for floating point an exponent e = -(floor(log2|x|)+1) clamped to
// [0, 2^EW-1] (gradual underflow at the clamp).  val() decodes a word.
// ref_add / ref_mul are "exact result, then q()".  ref_fft is a textbook
// in-place radix-2 DIT FFT using these operators, and dft() a double
// precision DFT for signal-to-quantization-noise measurements.
//
// From the study: the arithmetic rules the expected values are built from.
// The stimulus and checks are this design's own.
package tb_ref_pkg;

  typedef struct {
    bit flp;
    int wl;  // fixed-point word length
    int ew;  // floating-point exponent bits
    int mw;  // floating-point mantissa bits (sign included)
  } fmt_t;

  function automatic int width(fmt_t f);
    return f.flp ? f.ew + f.mw : f.wl;
  endfunction

  function automatic real val(fmt_t f, longint code);
    longint m;
    int     fb;
    int     e;
    if (!f.flp) begin
      fb = f.wl - 1;
      m  = code & ((64'sd1 <<< f.wl) - 1);
      if (m >= (64'sd1 <<< fb)) m = m - (64'sd1 <<< f.wl);
      return real'(m) / (2.0 ** fb);
    end
    fb = f.mw - 1;
    m  = code & ((64'sd1 <<< f.mw) - 1);
    if (m >= (64'sd1 <<< fb)) m = m - (64'sd1 <<< f.mw);
    e  = int'((code >>> f.mw) & ((64'sd1 <<< f.ew) - 1));
    return real'(m) / (2.0 ** (fb + e));
  endfunction

  // Quantize x; sat and ufl report saturation and gradual underflow.
  function automatic longint q(fmt_t f, real x, output bit sat, output bit ufl);
    longint m;
    int     fb;
    int     e;
    int     emax;
    real    ax;
    sat = 0;
    ufl = 0;
    ax  = (x < 0.0) ? -x : x;
    if (!f.flp) begin
      fb = f.wl - 1;
      m  = longint'($rtoi(x * (2.0 ** fb)));
      if (m > (64'sd1 <<< fb) - 1) begin
        sat = 1; m = (64'sd1 <<< fb) - 1;
      end else if (m < -(64'sd1 <<< fb)) begin
        sat = 1; m = -(64'sd1 <<< fb);
      end
      return m & ((64'sd1 <<< f.wl) - 1);
    end
    fb   = f.mw - 1;
    emax = (1 << f.ew) - 1;
    if (x == 0.0) begin
      m = 0; e = emax;
    end else if (ax >= 1.0) begin
      sat = 1;
      m   = (x < 0.0) ? -(64'sd1 <<< fb) : (64'sd1 <<< fb) - 1;
      e   = 0;
    end else begin
      e = 0;
      while (ax * (2.0 ** e) < 0.5) e++;
      if (e > emax) begin
        e   = emax;
        ufl = 1;
      end
      m = longint'($rtoi(x * (2.0 ** (e + fb))));
      if (m == 0) e = emax;
    end
    return ((longint'(e) <<< f.mw) | (m & ((64'sd1 <<< f.mw) - 1)));
  endfunction

  function automatic longint q0(fmt_t f, real x);
    bit s, u;
    return q(f, x, s, u);
  endfunction

  function automatic longint ref_add(fmt_t f, longint a, longint b, bit sub, output bit sat,
                                     output bit ufl);
    real r;
    r = sub ? val(f, a) - val(f, b) : val(f, a) + val(f, b);
    return q(f, r, sat, ufl);
  endfunction

  function automatic longint ref_mul(fmt_t f, longint a, longint b, output bit sat,
                                     output bit ufl);
    return q(f, val(f, a) * val(f, b), sat, ufl);
  endfunction

  // Complex product (ar + i ai)(br + i bi) with word-length-keeping operators.
  function automatic void ref_cmul(fmt_t f, longint ar, longint ai, longint br, longint bi,
                                   output longint yr, output longint yi, output bit sat,
                                   output bit ufl);
    longint ac, bd, ad, bc;
    bit     s[6], u[6];
    ac  = ref_mul(f, ar, br, s[0], u[0]);
    bd  = ref_mul(f, ai, bi, s[1], u[1]);
    ad  = ref_mul(f, ar, bi, s[2], u[2]);
    bc  = ref_mul(f, ai, br, s[3], u[3]);
    yr  = ref_add(f, ac, bd, 1, s[4], u[4]);
    yi  = ref_add(f, ad, bc, 0, s[5], u[5]);
    sat = s[0] | s[1] | s[2] | s[3] | s[4] | s[5];
    ufl = u[0] | u[1] | u[2] | u[3] | u[4] | u[5];
  endfunction

  function automatic void ref_twiddle(fmt_t f, int n, int k, output longint wr,
                                      output longint wi);
    real ph;
    ph = 2.0 * 3.14159265358979323846 * k / n;
    wr = q0(f, $cos(ph));
    wi = q0(f, -$sin(ph));
  endfunction

  // Radix-2 DIT butterfly; bypass skips the twiddle multiplication.
  function automatic void ref_bfly(fmt_t f, longint x0r, longint x0i, longint x1r,
                                   longint x1i, longint wr, longint wi, bit bypass,
                                   output longint y0r, output longint y0i,
                                   output longint y1r, output longint y1i,
                                   output bit sat, output bit ufl);
    longint tr, ti;
    bit     ms, mu;
    bit     s[4], u[4];
    if (bypass) begin
      tr = x1r; ti = x1i; ms = 0; mu = 0;
    end else begin
      ref_cmul(f, x1r, x1i, wr, wi, tr, ti, ms, mu);
    end
    y0r = ref_add(f, x0r, tr, 0, s[0], u[0]);
    y0i = ref_add(f, x0i, ti, 0, s[1], u[1]);
    y1r = ref_add(f, x0r, tr, 1, s[2], u[2]);
    y1i = ref_add(f, x0i, ti, 1, s[3], u[3]);
    sat = ms | s[0] | s[1] | s[2] | s[3];
    ufl = mu | u[0] | u[1] | u[2] | u[3];
  endfunction

  // In-place radix-2 DIT FFT of n points (n a power of two), natural-order
  // input and output; operands are words of format f.
  function automatic void ref_fft(fmt_t f, int n, ref longint xr[], ref longint xi[],
                                  output bit sat, output bit ufl);
    longint ar[], ai[];
    int     lg, r, span, base, j, k;
    longint wr, wi, y0r, y0i, y1r, y1i;
    bit     s, u;
    sat = 0;
    ufl = 0;
    ar  = new[n];
    ai  = new[n];
    lg  = $clog2(n);
    for (int i = 0; i < n; i++) begin
      r = 0;
      for (int b = 0; b < lg; b++) if ((i & (1 << b)) != 0) r |= 1 << (lg - 1 - b);
      ar[r] = xr[i];
      ai[r] = xi[i];
    end
    for (span = 1; span < n; span *= 2) begin
      for (base = 0; base < n; base += 2 * span) begin
        for (j = 0; j < span; j++) begin
          k = j * (n / (2 * span));
          ref_twiddle(f, n, k, wr, wi);
          ref_bfly(f, ar[base+j], ai[base+j], ar[base+j+span], ai[base+j+span], wr, wi,
                   k == 0, y0r, y0i, y1r, y1i, s, u);
          ar[base+j]      = y0r;
          ai[base+j]      = y0i;
          ar[base+j+span] = y1r;
          ai[base+j+span] = y1i;
          sat |= s;
          ufl |= u;
        end
      end
    end
    xr = ar;
    xi = ai;
  endfunction

  // Double precision DFT.
  function automatic void dft(int n, ref real xr[], ref real xi[], ref real yr[],
                              ref real yi[]);
    real ph;
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int i = 0; i < n; i++) begin
        ph    = 2.0 * 3.14159265358979323846 * ((k * i) % n) / n;
        yr[k] += xr[i] * $cos(ph) + xi[i] * $sin(ph);
        yi[k] += xi[i] * $cos(ph) - xr[i] * $sin(ph);
      end
    end
  endfunction

  // Standard normal sample (Box-Muller) from $urandom.
  function automatic real randn();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979323846 * u2);
  endfunction

endpackage
