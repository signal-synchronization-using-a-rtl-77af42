// dct1d: one output of a 4-point 1D DCT, y_k = round(w_k * sum_n c_n * x_n).
//
// Structure: four 16x16 multipliers give 32-bit products c_n*x_n, one adder
// sums them to 32 bits, a 32x16 multiplier applies the weight w_k to give 48
// bits, and a round block drops COS_FRAC*2 fraction bits and saturates to the
// 16-bit result. These widths and the order of the operations are those of
// the published datapath; the fraction-bit split (see vsync_pkg) is this
// design's own.
//
// Interface: c[0..3] are the cosines of row k of the DCT matrix, x[0..3] the
// input samples, wk the normalising weight; all signed 16 bit.
// Timing: purely combinational; the enclosing pass registers the result.
module dct1d
  import vsync_pkg::*;
(
  input  coef_t c  [BLK],
  input  coef_t x  [BLK],
  input  coef_t wk,
  output coef_t yk
);

  logic signed [PROD_W-1:0] prod [BLK];
  logic signed [PROD_W-1:0] sum;
  logic signed [WIDE_W-1:0] scaled;

  always_comb begin
    sum = '0;
    for (int n = 0; n < BLK; n++) begin
      prod[n] = PROD_W'(c[n]) * PROD_W'(x[n]);
      sum     = sum + prod[n];
    end
    scaled = WIDE_W'(sum) * WIDE_W'(wk);
    yk     = round_sat(scaled);
  end

endmodule
