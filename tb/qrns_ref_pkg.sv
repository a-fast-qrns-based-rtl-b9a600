// qrns_ref_pkg: reference arithmetic for the testbenches, written without the
// RTL's tables or modular units.
//  - cround / twiddle / hscale: the fixed-point coefficients recomputed from
//    cos/sin (twiddles round(2^9 W8^k), scale factors round(2^10 H_m));
//  - enc1 / enc2: QRNS encoding of a complex integer;
//  - dct_int: the integer transform (2^19 * DCT) evaluated with plain complex
//    integer arithmetic along the reordered FFT flow graph;
//  - dct_real: the DCT straight from its definition, in floating point.
package qrns_ref_pkg;

  typedef longint cplx_t [2];
  typedef longint vec8_t [8];
  typedef int unsigned smp8_t [8];
  typedef real   rvec8_t [8];

  localparam real PI = 3.14159265358979323846;

  function automatic longint cround(real v);
    if (v >= 0.0) return longint'($floor(v + 0.5));
    return -longint'($floor(-v + 0.5));
  endfunction

  function automatic cplx_t twiddle(int k);
    cplx_t w;
    w[0] = cround(512.0 * $cos(2.0 * PI * k / 8.0));
    w[1] = cround(-512.0 * $sin(2.0 * PI * k / 8.0));
    return w;
  endfunction

  function automatic cplx_t hscale(int m);
    cplx_t h;
    real k;
    k = (m == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    h[0] = cround(1024.0 * 0.5 * k * $cos(PI * m / 16.0));
    h[1] = cround(-1024.0 * 0.5 * k * $sin(PI * m / 16.0));
    return h;
  endfunction

  function automatic longint pmod(longint v, longint m);
    longint r;
    r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic int unsigned enc1(cplx_t z, int unsigned m, int unsigned r);
    return 32'(pmod(z[0] + longint'(r) * z[1], longint'(m)));
  endfunction

  function automatic int unsigned enc2(cplx_t z, int unsigned m, int unsigned r);
    return 32'(pmod(z[0] - longint'(r) * z[1], longint'(m)));
  endfunction

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t c; c[0] = a[0] + b[0]; c[1] = a[1] + b[1]; return c;
  endfunction
  function automatic cplx_t csub(cplx_t a, cplx_t b);
    cplx_t c; c[0] = a[0] - b[0]; c[1] = a[1] - b[1]; return c;
  endfunction
  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    cplx_t c;
    c[0] = a[0] * b[0] - a[1] * b[1];
    c[1] = a[0] * b[1] + a[1] * b[0];
    return c;
  endfunction
  function automatic cplx_t creal(longint v);
    cplx_t c; c[0] = v; c[1] = 0; return c;
  endfunction

  // Scaled DFT values Z(m) = H_m * Y(m) * 2^19 for m in {0, 1, 2, 4, 5},
  // following the radix-2 DIF flow graph in exact complex integers.
  typedef cplx_t zvec_t [8];

  function automatic zvec_t zvals(smp8_t x);
    zvec_t z;
    longint y [8];
    cplx_t a [4], b [4], ap0, ap1, app0, app1, bp0, bp1, yv [8], h;
    for (int n = 0; n < 4; n++) begin
      y[n]     = longint'(x[2*n]);
      y[7 - n] = longint'(x[2*n + 1]);
    end
    for (int n = 0; n < 4; n++) begin
      a[n] = creal(y[n] + y[n+4]);
      b[n] = cmul(creal(y[n] - y[n+4]), twiddle(n));
    end
    ap0  = cadd(a[0], a[2]);
    ap1  = cadd(a[1], a[3]);
    app0 = cmul(csub(a[0], a[2]), twiddle(0));
    app1 = cmul(csub(a[1], a[3]), twiddle(2));
    bp0  = cadd(b[0], b[2]);
    bp1  = cadd(b[1], b[3]);
    yv[0] = cadd(ap0, ap1);
    yv[4] = csub(ap0, ap1);
    yv[2] = cadd(app0, app1);
    yv[1] = cadd(bp0, bp1);
    yv[5] = csub(bp0, bp1);
    // the two paths that skip the twiddle stage get the exact factor 2^9
    yv[0][0] = yv[0][0] * 512; yv[0][1] = yv[0][1] * 512;
    yv[4][0] = yv[4][0] * 512; yv[4][1] = yv[4][1] * 512;
    foreach (yv[m]) begin
      if (m == 0 || m == 1 || m == 2 || m == 4 || m == 5) begin
        h = hscale(m);
        z[m] = cmul(yv[m], h);
      end else begin
        z[m][0] = 0; z[m][1] = 0;
      end
    end
    return z;
  endfunction

  // 2^19 * DCT, as delivered by the processor.
  function automatic vec8_t dct_int(smp8_t x);
    vec8_t X;
    zvec_t z;
    z = zvals(x);
    X[0] = z[0][0];  X[1] = z[1][0];  X[2] = z[2][0];  X[3] = -z[5][1];
    X[4] = z[4][0];  X[5] = z[5][0];  X[6] = -z[2][1]; X[7] = -z[1][1];
    return X;
  endfunction

  // DCT from its definition.
  function automatic rvec8_t dct_real(smp8_t x);
    rvec8_t X;
    for (int m = 0; m < 8; m++) begin
      real s;
      s = 0.0;
      for (int n = 0; n < 8; n++)
        s += real'(x[n]) * $cos((2.0 * n + 1.0) * m * PI / 16.0);
      X[m] = $sqrt(2.0 / 8.0) * ((m == 0) ? 1.0 / $sqrt(2.0) : 1.0) * s;
    end
    return X;
  endfunction

endpackage
