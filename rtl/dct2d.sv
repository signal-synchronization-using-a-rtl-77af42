// dct2d: 2D DCT of a 4x4 block, computed as a 1D DCT of every row followed by
// a 1D DCT of every column (the separable method).
//
// Two dct4_pass stages, each one clock: the first transforms the rows, the
// second the columns of the row result. A new block can enter every clock.
//
// Interface: in_valid/in_blk (samples in the 16-bit calculation format),
// out_valid/out_blk (coefficients, [row=vertical frequency][column=horizontal
// frequency]). Latency: 2 clocks.
module dct2d
  import vsync_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  blk_t in_blk,
  output logic out_valid,
  output blk_t out_blk
);

  logic row_valid;
  blk_t row_blk;

  dct4_pass #(.INVERSE(1'b0), .COLUMNS(1'b0)) u_row (
    .clk, .rst_n, .in_valid, .in_blk,
    .out_valid(row_valid), .out_blk(row_blk)
  );

  dct4_pass #(.INVERSE(1'b0), .COLUMNS(1'b1)) u_col (
    .clk, .rst_n, .in_valid(row_valid), .in_blk(row_blk),
    .out_valid, .out_blk
  );

endmodule
