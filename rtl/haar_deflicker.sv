// haar_deflicker: flicker reduction by a two-point Haar transform across
// consecutive 4x4 coefficient blocks, a threshold on the Haar detail, and the
// reverse Haar transform.
//
// For every coefficient position the current block a is paired with the
// block b that went through this stage just before it (the previous block in
// time). Clock 1 computes the integer Haar pair
//     s = floor((a + b) / 2),   d = a - s
// and, when enabled, clears d if |d| < thr. Clock 2 applies the reverse
// transform a' = s + d and saturates to 16 bits. With d kept, a' equals a
// exactly; with d cleared, a' becomes the mean of the two blocks, so small
// block-to-block fluctuations (flicker) are smoothed while real changes
// (large d) pass. A block flagged in_first (the first block of a band of four
// lines) and the first block after reset have no partner and pass unchanged. The two-clock split follows the published schedule (Haar
// transform in clock 4, reverse in clock 5); pairing with the previous block
// in time, the integer (lifting) form and the threshold rule are this
// design's own reading of the temporal Haar step.
//
// Interface: en, thr, in_valid/in_first/in_blk -> out_valid/out_blk. Latency: 2 clocks,
// one block per clock.
module haar_deflicker
  import vsync_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  coef_t thr,
  input  logic  in_valid,
  input  logic  in_first,
  input  blk_t  in_blk,
  output logic  out_valid,
  output blk_t  out_blk
);

  typedef logic signed [CALC_W:0] wide_t;  // one guard bit for s and d

  blk_t  prev_blk;
  logic  prev_ok;
  wide_t s_c [BLK][BLK], d_c [BLK][BLK];
  wide_t s_q [BLK][BLK], d_q [BLK][BLK];
  logic  mid_valid;

  // Clock 1: Haar transform and threshold of the detail.
  always_comb begin
    for (int r = 0; r < BLK; r++) begin
      for (int c = 0; c < BLK; c++) begin
        wide_t a, b, sum;
        logic [CALC_W:0] mag;
        a   = wide_t'(in_blk[r][c]);
        b   = (prev_ok && !in_first) ? wide_t'(prev_blk[r][c]) : a;
        sum = a + b;
        s_c[r][c] = sum >>> 1;
        d_c[r][c] = a - s_c[r][c];
        mag = (d_c[r][c] < 0) ? $unsigned(-d_c[r][c]) : $unsigned(d_c[r][c]);
        if (en && (mag < (CALC_W+1)'($unsigned(thr))))
          d_c[r][c] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid_valid <= 1'b0;
      out_valid <= 1'b0;
      prev_ok   <= 1'b0;
    end else begin
      mid_valid <= in_valid;
      out_valid <= mid_valid;
      if (in_valid) prev_ok <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      prev_blk <= in_blk;
      s_q      <= s_c;
      d_q      <= d_c;
    end
  end

  // Clock 2: reverse Haar transform with saturation.
  always_ff @(posedge clk) begin
    if (mid_valid) begin
      for (int r = 0; r < BLK; r++) begin
        for (int c = 0; c < BLK; c++) begin
          logic signed [CALC_W+1:0] v;
          v = (CALC_W+2)'(s_q[r][c]) + (CALC_W+2)'(d_q[r][c]);
          if (v > (CALC_W+2)'(32767))       out_blk[r][c] <= 16'sh7fff;
          else if (v < -(CALC_W+2)'(32768)) out_blk[r][c] <= 16'sh8000;
          else                              out_blk[r][c] <= coef_t'(v);
        end
      end
    end
  end

endmodule
