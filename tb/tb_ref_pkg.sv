// tb_ref_pkg: reference models used by the testbenches.
//
// These are written independently of the RTL: floating-point products are
// computed in double precision (exact for binary16 and binary32 operands)
// and then rounded to the target format by integer arithmetic on the double's
// bit pattern; the under-designed multiplier is modelled as the exact product
// minus its known error (2 * 4^(i+j) for every pair of 2-bit digits that are
// both 3); the GeAr adder is modelled window by window with integer adds; the
// convolution is a direct sum over the 3x3 neighbourhood.
package tb_ref_pkg;

  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  // binary floating point (1 + E + M bits, in the low bits) to real; finite only
  function automatic real fp_to_real(longint unsigned bits, int E, int M);
    int  bias = (1 << (E-1)) - 1;
    longint unsigned frac = bits & ((64'd1 << M) - 1);
    int  ex   = int'((bits >> M) & ((64'd1 << E) - 1));
    bit  s    = bits[E+M];
    real v;
    if (ex == 0) v = real'(frac) * pow2(1 - bias - M);
    else         v = (real'(frac) + pow2(M)) * pow2(ex - bias - M);
    return s ? -v : v;
  endfunction

  // real (finite, non-zero, a normal double) to binary floating point,
  // round to nearest even
  function automatic longint unsigned fp_from_real(real r, int E, int M);
    int  bias = (1 << (E-1)) - 1;
    longint unsigned maxexp = (64'd1 << E) - 1;
    bit [63:0] d = $realtobits(r);
    bit  s = d[63];
    int  e2 = int'(d[62:52]) - 1023;               // r = sig53 * 2^(e2-52)
    longint unsigned sig = {1'b1, d[51:0]};
    int  eb = e2 + bias;
    int  ue = ((eb >= 1) ? eb : 1) - bias - M;     // exponent of one ulp
    int  sh = ue - (e2 - 52);
    longint unsigned q, rem, half, pk;
    if (r == 0.0) return longint'(s) << (E+M);
    if (sh > 60) begin q = 0; rem = 1; half = 2; end // far below: rounds to 0
    else begin
      q    = sig >> sh;
      rem  = sig & ((64'd1 << sh) - 1);
      half = (sh == 0) ? 0 : (64'd1 << (sh-1));
    end
    if (sh > 0 && (rem > half || (rem == half && q[0]))) q = q + 1;
    if (eb >= 1) pk = (longint'(eb) << M) + (q - (64'd1 << M));
    else         pk = q;
    if (eb >= int'(maxexp) || pk >= (maxexp << M)) pk = maxexp << M;
    return (longint'(s) << (E+M)) | pk;
  endfunction

  // full IEEE multiply reference, including special values
  function automatic longint unsigned fp_mul_ref(longint unsigned a, longint unsigned b, int E, int M);
    longint unsigned emask = (64'd1 << E) - 1, fmask = (64'd1 << M) - 1;
    longint unsigned ea = (a >> M) & emask, eb = (b >> M) & emask;
    longint unsigned fa = a & fmask, fb = b & fmask;
    bit s = a[E+M] ^ b[E+M];
    bit an = ea == emask && fa != 0, bn = eb == emask && fb != 0;
    bit ai = ea == emask && fa == 0, bi = eb == emask && fb == 0;
    bit az = ea == 0 && fa == 0,     bz = eb == 0 && fb == 0;
    if (an || bn || (ai && bz) || (bi && az)) return (emask << M) | (64'd1 << (M-1));
    if (ai || bi) return (longint'(s) << (E+M)) | (emask << M);
    if (az || bz) return longint'(s) << (E+M);
    return fp_from_real(fp_to_real(a, E, M) * fp_to_real(b, E, M), E, M) | (longint'(s) << (E+M));
  endfunction

  // under-designed multiplier: exact product minus 2*4^(i+j) per (3,3) digit pair
  function automatic longint unsigned udm_ref(longint unsigned a, longint unsigned x, int W);
    longint unsigned p = a * x;
    for (int i = 0; i < W/2; i++)
      for (int j = 0; j < W/2; j++)
        if (((a >> (2*i)) & 3) == 3 && ((x >> (2*j)) & 3) == 3) p = p - (64'd2 << (2*(i+j)));
    return p;
  endfunction

  // GeAr(N,R,P): result bits i*R+P .. i*R+L-1 come from an L-bit add of the
  // operand bits i*R .. i*R+L-1 alone
  function automatic longint unsigned gear_ref(longint unsigned a, longint unsigned b, int N, int R, int P);
    int L = R + P;
    longint unsigned lm = (64'd1 << L) - 1, s, w;
    w = (a & lm) + (b & lm);
    s = w & lm;
    for (int i = 1; i <= (N - L) / R; i++) begin
      w = ((a >> (i*R)) & lm) + ((b >> (i*R)) & lm);
      s = s | (((w >> P) & ((64'd1 << R) - 1)) << (i*R + P));
    end
    return s & ((64'd1 << N) - 1);
  endfunction

  // one output pixel of the 3x3 convolution; arith 0 exact, 1 GeAr adder,
  // 2 UDM multiplier; 16-bit products and sums, saturated to 0..255
  function automatic int conv_pix_ref(int win[3][3], int coef[3][3], int arith);
    int acc = 0, p, sum16;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        if (arith == 2) begin
          int mag = coef[r][c] < 0 ? -coef[r][c] : coef[r][c];
          p = int'(udm_ref(longint'(win[r][c]), longint'(mag), 16) & 64'hFFFF);
          if (coef[r][c] < 0) p = -p;
        end else begin
          p = coef[r][c] * win[r][c];
        end
        p = int'(shortint'(p));
        if (arith == 1) acc = int'(shortint'(gear_ref(longint'(acc) & 64'hFFFF, longint'(p) & 64'hFFFF, 16, 4, 4)));
        else            acc = int'(shortint'(acc + p));
      end
    sum16 = acc;
    if (sum16 < 0)   return 0;
    if (sum16 > 255) return 255;
    return sum16;
  endfunction

  // synthetic test image: a gradient, bright and dark rectangles and noise,
  // so that edges, flat areas and both saturation limits all occur
  function automatic int img_pix(int x, int y, int w, int h, int seed);
    int v = (x * 160) / (w > 1 ? w : 1) + (y * 60) / (h > 1 ? h : 1);
    if (x > w/4 && x < w/2 && y > h/4 && y < (3*h)/4) v = 250;
    if (x > (5*w)/8 && y < h/3) v = 5;
    v = v + int'(((x * 7919 + y * 104729 + seed * 31) % 23)) - 11;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  // reference output pixel (x, y) of a w x h image held row-major in img
  function automatic int conv_img_ref(int img[], int w, int h, int x, int y, int coef[3][3], int arith);
    int win [3][3];
    if (x == 0 || y == 0 || x == w-1 || y == h-1) return 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[r][c] = img[(y + r - 1) * w + (x + c - 1)];
    return conv_pix_ref(win, coef, arith);
  endfunction

endpackage
