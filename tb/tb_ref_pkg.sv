// tb_ref_pkg: reference models for the testbenches, written apart from the
// RTL. The cosine and weight constants are derived here from $cos/$sqrt;
// the arithmetic uses 64-bit integers with explicit rounding and saturation
// as specified: 16-bit operands with 4 fraction bits, 14-bit-fraction
// cosines/weights, results rounded by adding 2^27 and shifting right by 28,
// then saturated to signed 16 bit.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Packed so that blocks can be kept in queues.
  typedef logic signed [3:0][3:0][63:0] blk64_t;
  typedef int unsigned pix16_t [16];

  function automatic longint rcos(int k, int n);
    return longint'($rtoi($floor($cos((2.0*n + 1.0) * k * PI / 8.0) * 16384.0 + 0.5)));
  endfunction

  function automatic longint rw(int k);
    real w;
    w = (k == 0) ? $sqrt(1.0/4.0) : $sqrt(2.0/4.0);
    return longint'($rtoi($floor(w * 16384.0 + 0.5)));
  endfunction

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint rnd28(longint v);
    return sat16((v + (64'sd1 <<< 27)) >>> 28);
  endfunction

  // Fixed-point 1D DCT output k / 1D IDCT output n, as specified.
  function automatic longint fdct(longint x0, longint x1, longint x2, longint x3, int k);
    longint s;
    s = rcos(k,0)*x0 + rcos(k,1)*x1 + rcos(k,2)*x2 + rcos(k,3)*x3;
    return rnd28(s * rw(k));
  endfunction

  function automatic longint fidct(longint y0, longint y1, longint y2, longint y3, int n);
    longint s;
    s = rcos(0,n)*y0*rw(0) + rcos(1,n)*y1*rw(1) + rcos(2,n)*y2*rw(2) + rcos(3,n)*y3*rw(3);
    return rnd28(s);
  endfunction

  // Ideal (real) 1D DCT/IDCT for accuracy checks.
  function automatic real rdct(real x0, real x1, real x2, real x3, int k);
    real w, s;
    real x [4];
    x = '{x0, x1, x2, x3};
    w = (k == 0) ? $sqrt(0.25) : $sqrt(0.5);
    s = 0.0;
    for (int n = 0; n < 4; n++) s += $cos((2.0*n + 1.0) * k * PI / 8.0) * x[n];
    return w * s;
  endfunction

  function automatic real ridct(real y0, real y1, real y2, real y3, int n);
    real s;
    real y [4];
    y = '{y0, y1, y2, y3};
    s = 0.0;
    for (int k = 0; k < 4; k++)
      s += $cos((2.0*n + 1.0) * k * PI / 8.0) * ((k == 0) ? $sqrt(0.25) : $sqrt(0.5)) * y[k];
    return s;
  endfunction

  function automatic blk64_t fdct2(blk64_t b);
    blk64_t t, o;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 4; k++) t[r][k] = fdct(b[r][0], b[r][1], b[r][2], b[r][3], k);
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 4; k++) o[k][c] = fdct(t[0][c], t[1][c], t[2][c], t[3][c], k);
    return o;
  endfunction

  function automatic blk64_t fidct2(blk64_t b);
    blk64_t t, o;
    for (int r = 0; r < 4; r++)
      for (int n = 0; n < 4; n++) t[r][n] = fidct(b[r][0], b[r][1], b[r][2], b[r][3], n);
    for (int c = 0; c < 4; c++)
      for (int n = 0; n < 4; n++) o[n][c] = fidct(t[0][c], t[1][c], t[2][c], t[3][c], n);
    return o;
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint iabs(longint v);
    return (v < 0) ? -v : v;
  endfunction

  // Denoising threshold: clear AC coefficients below thr. Returns the count.
  function automatic int thr_blk(ref blk64_t b, input bit en, input longint thr);
    int n;
    n = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (en && !(r == 0 && c == 0) && iabs(b[r][c]) < thr) begin
          if (b[r][c] != 0) n++;
          b[r][c] = 0;
        end
    return n;
  endfunction

  // Haar pair with the previous block, detail threshold, reverse Haar.
  // Returns the number of non-zero details cleared.
  function automatic int haar_blk(ref blk64_t b, ref blk64_t prev, ref bit prev_ok,
                                  input bit en, input longint thr, input bit first = 0);
    int n;
    blk64_t cur;
    n = 0;
    cur = b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        longint a, p, s, d;
        a = cur[r][c];
        p = (prev_ok && !first) ? prev[r][c] : a;
        s = (a + p) >>> 1;
        d = a - s;
        if (en && iabs(d) < thr) begin
          if (d != 0) n++;
          d = 0;
        end
        b[r][c] = sat16(s + d);
      end
    prev = cur;
    prev_ok = 1;
    return n;
  endfunction

  function automatic int unsigned to_pix(longint c);
    longint r;
    r = (c + 8) >>> 4;
    if (r < 0) return 0;
    if (r > 255) return 255;
    return int'(r);
  endfunction

endpackage
