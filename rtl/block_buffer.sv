// block_buffer: the buffer memory of the delay and process block. It holds
// BLK=4 video lines of LINE_BYTES bytes (default 4 x 1716 = 6,864 bytes, one
// 4-line band of an ITU-R 601 525-line 4:2:2 stream).
//
// Organisation: ENTRIES = LINE_BYTES/4 words of 16 bytes. Word e holds the
// 4x4 block made of columns 4e..4e+3 of the four buffered lines; byte lane
// row*4+col. The incoming stream is written in real time one byte per clock
// (byte write port); a whole 4x4 block is read in one clock for processing
// (block read port) and the processed block is written back in one clock
// (block write port); the delayed output stream is read one byte per clock
// (byte read port). All four ports can be used in the same clock. When the
// byte write and the block write address the same byte, the byte write wins.
// The organisation into 16-byte words, so that a block is read in one clock,
// is this design's own; the capacity is the published one.
//
// Timing: both read ports are registered (data one clock after the request)
// and return the contents before a write in the same clock.
module block_buffer
  import vsync_pkg::*;
#(
  parameter int LINE_BYTES = 1716,
  localparam int ENTRIES   = LINE_BYTES / BLK,
  localparam int AW        = $clog2(ENTRIES)
) (
  input  logic              clk,
  // byte write (incoming stream)
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_entry,
  input  logic [3:0]        wr_lane,
  input  pix_t              wr_data,
  // byte read (outgoing stream)
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_entry,
  input  logic [3:0]        rd_lane,
  output pix_t              rd_data,
  // block read (to the processing pipeline)
  input  logic              blk_rd_en,
  input  logic [AW-1:0]     blk_rd_entry,
  output pix_blk_t          blk_rd_data,
  // block write (from the processing pipeline)
  input  logic              blk_wr_en,
  input  logic [AW-1:0]     blk_wr_entry,
  input  pix_blk_t          blk_wr_data
);

  pix_blk_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (blk_wr_en) mem[blk_wr_entry] <= blk_wr_data;
    if (wr_en)     mem[wr_entry][wr_lane] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en)     rd_data     <= mem[rd_entry][rd_lane];
    if (blk_rd_en) blk_rd_data <= mem[blk_rd_entry];
  end

endmodule
