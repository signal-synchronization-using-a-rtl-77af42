// idct1d: one output of a 4-point 1D IDCT, x_n = round(sum_k c_k * y_k * w_k).
//
// Structure: four three-input multipliers form the 48-bit products
// c_k*y_k*w_k, one 48-bit adder sums them, and a round block drops
// COS_FRAC*2 fraction bits and saturates to the 16-bit result. The widths
// (16-bit operands, 48-bit products and sum, 16-bit output) are those of the
// published datapath; the fraction-bit split (see vsync_pkg) is this design's.
//
// Interface: c[k] is cos((2n+1)k*pi/8) for the output index n, y[k] the
// coefficients, w[k] the normalising weights; all signed 16 bit.
// Timing: purely combinational; the enclosing pass registers the result.
module idct1d
  import vsync_pkg::*;
(
  input  coef_t c [BLK],
  input  coef_t y [BLK],
  input  coef_t w [BLK],
  output coef_t xn
);

  logic signed [WIDE_W-1:0] prod [BLK];
  logic signed [WIDE_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int k = 0; k < BLK; k++) begin
      prod[k] = WIDE_W'(c[k]) * WIDE_W'(y[k]) * WIDE_W'(w[k]);
      sum     = sum + prod[k];
    end
    xn = round_sat(sum);
  end

endmodule
