// dct4_pass: one registered pass of the 4x4 2D (I)DCT, over all four rows or
// all four columns of a block in one clock.
//
// Sixteen 1D units (dct1d, or idct1d when INVERSE=1) work in parallel: for the
// row pass, output [r][k] is the 1D transform of row r; for the column pass,
// output [k][c] is the 1D transform of column c. The result and its valid flag
// are registered, so a pass is one pipeline clock, as in the clock-by-clock
// schedule of the delay and process block (DCT row, DCT column, IDCT row,
// IDCT column each take one clock).
//
// Interface: in_valid/in_blk in, out_valid/out_blk one clock later.
// Reset clears out_valid only; data registers are not reset.
module dct4_pass
  import vsync_pkg::*;
#(
  parameter bit INVERSE = 1'b0,  // 0: forward DCT, 1: inverse DCT
  parameter bit COLUMNS = 1'b0   // 0: transform rows, 1: transform columns
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  blk_t  in_blk,
  output logic  out_valid,
  output blk_t  out_blk
);

  blk_t res;

  for (genvar v = 0; v < BLK; v++) begin : g_vec
    coef_t vec [BLK];
    for (genvar i = 0; i < BLK; i++) begin : g_gather
      assign vec[i] = COLUMNS ? in_blk[i][v] : in_blk[v][i];
    end
    for (genvar o = 0; o < BLK; o++) begin : g_out
      coef_t r;
      if (!INVERSE) begin : g_fwd
        coef_t crow [BLK];
        for (genvar n = 0; n < BLK; n++) begin : g_c
          assign crow[n] = COS_TAB[o][n];
        end
        dct1d u_dct (.c(crow), .x(vec), .wk(W_TAB[o]), .yk(r));
      end else begin : g_inv
        coef_t ccol [BLK];
        for (genvar k = 0; k < BLK; k++) begin : g_c
          assign ccol[k] = COS_TAB[k][o];
        end
        idct1d u_idct (.c(ccol), .y(vec), .w(W_TAB), .xn(r));
      end
      if (COLUMNS) begin : g_col
        assign res[o][v] = r;
      end else begin : g_row
        assign res[v][o] = r;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_blk <= res;
  end

endmodule
