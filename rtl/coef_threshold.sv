// coef_threshold: denoising threshold applied to a 4x4 block of DCT
// coefficients ("apply threshold" between the 2D DCT and the Haar stage).
//
// Hard thresholding: when enabled, every AC coefficient whose magnitude is
// below the threshold is set to zero; the DC coefficient [0][0] always passes.
// Small AC coefficients carry mostly the scattered background noise, so
// clearing them removes it while edges (large coefficients) survive. The
// choice of hard thresholding and of sparing the DC term is this design's
// own; the source names the step only.
//
// Interface: en, thr (same format as the coefficients), in_blk -> out_blk.
// Timing: combinational; it sits in front of the Haar stage's first register.
module coef_threshold
  import vsync_pkg::*;
(
  input  logic  en,
  input  coef_t thr,
  input  blk_t  in_blk,
  output blk_t  out_blk
);

  always_comb begin
    for (int r = 0; r < BLK; r++) begin
      for (int c = 0; c < BLK; c++) begin
        logic [CALC_W:0] mag;
        mag = (in_blk[r][c] < 0) ? (CALC_W+1)'(-(CALC_W+1)'(in_blk[r][c]))
                                 : (CALC_W+1)'(in_blk[r][c]);
        if (en && !(r == 0 && c == 0) && (mag < (CALC_W+1)'($unsigned(thr))))
          out_blk[r][c] = '0;
        else
          out_blk[r][c] = in_blk[r][c];
      end
    end
  end

endmodule
