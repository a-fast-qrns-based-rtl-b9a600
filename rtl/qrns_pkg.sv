// qrns_pkg: types, constants and elaboration-time helper functions shared by
// the QRNS (quadratic residue number system) 8-point DCT processor.
//
// A residue is carried in a container of up to 8 bits (res_t); a channel with
// modulus m uses only its low n = ceil(log2 m) bits. Each channel works on
// complex integers in QRNS form: q1 + j*q2 is held as the pair
//   (|q1 + r*q2|_m , |q1 - r*q2|_m)   with r*r = -1 (mod m).
//
// Fixed-point constants. The twiddle factors W8^k = exp(-j*2*pi*k/8) and the
// output scale factors H_m = sqrt(2/N)*K_m*exp(-j*pi*m/(2N)) are rounded to
// integers with ten bits of magnitude:
//   TW_RE[k] + j*TW_IM[k] = round(2^9  * W8^k)
//   H_RE[m]  + j*H_IM[m]  = round(2^10 * H_m)   (|H_m| <= 1/2)
// so every DCT coefficient leaves the datapath multiplied by 2^(9+10) = 2^19.
// The integer values follow directly from those formulas (cos/sin of k*pi/4
// and m*pi/16); the ten-bit precision is the document's, the split into
// 2^9 and 2^10 is this design's choice.
package qrns_pkg;

  localparam int unsigned RES_W   = 8;   // widest residue (8-bit moduli)
  localparam int unsigned X_W     = 8;   // input sample width (unsigned)
  localparam int unsigned NPTS    = 8;   // transform length
  localparam int unsigned TW_SH   = 9;   // log2 of twiddle scale
  localparam int unsigned H_SH    = 10;  // log2 of H_m scale
  localparam int unsigned OUT_SH  = TW_SH + H_SH;  // log2 of output scale

  localparam int unsigned MAX_CH = 8;  // most residue channels supported

  // The epsilon-CRT adder is pipelined in slices of this many bits, one
  // register stage per slice (3, 2 and 1 stages for 24-, 16- and 8-bit
  // outputs).
  localparam int unsigned ECRT_SEG_W = 8;

  typedef logic [RES_W-1:0] res_t;
  // Moduli (or roots) of a residue set; entries at and above the channel
  // count L are unused and set to 0.
  typedef int unsigned mod_set_t [MAX_CH];
  typedef logic [X_W-1:0]   sample_t;

  // round(2^9 * W8^k), k = 0..3
  localparam int TW_RE [4] = '{512,  362,    0, -362};
  localparam int TW_IM [4] = '{  0, -362, -512, -362};

  // round(2^10 * H_m), m = 0..7; H_0 is real (K_0 = 1/sqrt(2)).
  localparam int H_RE [8] = '{362,  502,  473,  426,  362,  284,  196,  100};
  localparam int H_IM [8] = '{  0, -100, -196, -284, -362, -426, -473, -502};

  // Non-negative remainder of a signed value.
  function automatic int unsigned modp(longint v, int unsigned m);
    longint r;
    r = v % longint'(m);
    if (r < 0) r = r + longint'(m);
    return 32'(r);
  endfunction

  // First QRNS component of the complex constant re + j*im.
  function automatic int unsigned qrns_c1(int re, int im,
                                          int unsigned m, int unsigned r);
    return modp(longint'(re) + longint'(r) * longint'(im), m);
  endfunction

  // Second QRNS component of the complex constant re + j*im.
  function automatic int unsigned qrns_c2(int re, int im,
                                          int unsigned m, int unsigned r);
    return modp(longint'(re) - longint'(r) * longint'(im), m);
  endfunction

  // Clock cycles from residues to scaled output in ecrt_conv: one for the
  // table register plus one per adder slice.
  function automatic int unsigned ecrt_latency(int unsigned out_w);
    return 1 + (out_w + ECRT_SEG_W - 1) / ECRT_SEG_W;
  endfunction

  // Multiplicative inverse of a modulo m (a and m coprime), by search.
  function automatic int unsigned mod_inv(int unsigned a, int unsigned m);
    int unsigned res;
    res = 0;
    for (int unsigned k = 1; k < m; k++)
      if (((a % m) * k) % m == 1) res = k;
    return res;
  endfunction

endpackage
