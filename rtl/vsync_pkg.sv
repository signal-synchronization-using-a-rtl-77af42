// vsync_pkg: types, widths and constants shared by the receiver-side
// synchronization, denoising and deflickering datapath.
//
// Number formats (the widths follow the 1D DCT/IDCT datapath: 8-bit video,
// 16-bit operands, 32-bit products and sums, 48-bit scaled results):
//   * pixel           : unsigned 8 bit (ITU-R 601 YCbCr sample)
//   * coef_t          : signed 16 bit with PIX_FRAC=4 fraction bits (a pixel
//                       enters as {4'b0, pix, 4'b0})
//   * cosine / weight : signed 16 bit with COS_FRAC=14 fraction bits
// The number of fraction bits is this design's own choice; only the widths are
// fixed by the datapath description.
//
// The 4-point DCT used is the orthonormal DCT-II:
//   y[k] = w[k] * sum_n c[k][n] * x[n],  c[k][n] = cos((2n+1)k*pi/8),
//   w[0] = sqrt(1/4) = 0.5, w[k>0] = sqrt(2/4) = 0.7071
// and its inverse x[n] = sum_k c[k][n] * w[k] * y[k].
// COS_TAB and W_TAB hold round(value * 2^14).
package vsync_pkg;

  localparam int BLK        = 4;   // block edge: 4x4 pixel blocks
  localparam int PIX_W      = 8;   // video sample width
  localparam int CALC_W     = 16;  // operand width of the DCT datapath
  localparam int PROD_W     = 32;  // width of c*x products and their sum
  localparam int WIDE_W     = 48;  // width after the weight multiply
  localparam int PIX_FRAC   = 4;   // fraction bits of coef_t
  localparam int COS_FRAC   = 14;  // fraction bits of cosines and weights
  localparam int ROUND_SH   = 2 * COS_FRAC; // shift that returns a 48-bit result to coef_t

  typedef logic signed [CALC_W-1:0] coef_t;
  typedef logic        [PIX_W-1:0]  pix_t;

  // A 4x4 block of coefficients, [row][column].
  typedef coef_t blk_t [BLK][BLK];

  // A 4x4 block of pixels as one buffer word; lane = row*BLK + column.
  typedef logic [BLK*BLK-1:0][PIX_W-1:0] pix_blk_t;

  // Runtime settings of the noise reduction stages.
  typedef struct packed {
    logic  dn_en;   // apply the coefficient (denoising) threshold
    coef_t dn_thr;  // AC coefficients with |y| < dn_thr are cleared
    logic  fl_en;   // apply the Haar (deflicker) threshold
    coef_t fl_thr;  // Haar detail values with |d| < fl_thr are cleared
  } nr_cfg_t;

  // round(cos((2n+1)k*pi/8) * 2^14), [k][n]
  localparam coef_t COS_TAB [BLK][BLK] = '{
    '{16'sd16384,  16'sd16384,  16'sd16384,  16'sd16384},
    '{16'sd15137,  16'sd6270,  -16'sd6270,  -16'sd15137},
    '{16'sd11585, -16'sd11585, -16'sd11585,  16'sd11585},
    '{16'sd6270,  -16'sd15137,  16'sd15137, -16'sd6270}
  };

  // round(w[k] * 2^14)
  localparam coef_t W_TAB [BLK] = '{16'sd8192, 16'sd11585, 16'sd11585, 16'sd11585};

  // Round a 48-bit value to nearest (half away from minus infinity), drop
  // ROUND_SH fraction bits and saturate to coef_t.
  function automatic coef_t round_sat(input logic signed [WIDE_W-1:0] v);
    logic signed [WIDE_W-1:0] r;
    r = (v + (WIDE_W'(1) <<< (ROUND_SH - 1))) >>> ROUND_SH;
    if (r > WIDE_W'(32767))       return coef_t'(16'sh7fff);
    else if (r < -WIDE_W'(32768)) return coef_t'(16'sh8000);
    else                          return coef_t'(r);
  endfunction

  // 8-bit pixel to the 16-bit calculation format.
  function automatic coef_t pix_to_coef(input pix_t p);
    return coef_t'({4'b0000, p, 4'b0000});
  endfunction

  // 16-bit calculation format back to an 8-bit pixel: round, clamp to 0..255.
  function automatic pix_t coef_to_pix(input coef_t c);
    logic signed [CALC_W:0] r;
    r = (CALC_W+1)'(c) + (CALC_W+1)'(1 <<< (PIX_FRAC - 1));
    r = r >>> PIX_FRAC;
    if (r < 0)        return 8'd0;
    else if (r > 255) return 8'd255;
    else              return pix_t'(r);
  endfunction

endpackage
