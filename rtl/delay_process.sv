// delay_process: the delay control and process block of the receiver. It
// writes the incoming optical video stream into a 4-line buffer, cleans each
// completed 4x4 block in an 8-clock pipeline and writes it back, and reads the
// stream out in step with the electrical link's timing.
//
// Delay control. A line position counter (row 0..3 of the 4-line band,
// column 0..LINE_BYTES-1) runs on the electrical timing: e_hs marks column 0.
// A byte arriving on the optical link belongs to the position that the
// electrical link showed delay_amount clocks earlier, so it is written at
// (electrical position - delay_amount). The output is read at the electrical
// position itself, i.e. from the slot that will be overwritten delay_amount
// clocks later. Every byte therefore stays 4*LINE_BYTES - delay_amount clocks
// in the buffer, and leaves exactly 4 lines (+1 clock for the registered
// read) after the electrical control that belongs to it: the electrical
// signals need no buffer of their own, only the one-clock alignment done here.
//
// Processing. When the last byte of a 4x4 block (row 3, column 4e+3) of the
// active picture (columns >= ACTIVE_START) has been written, the block goes
// through the schedule
//   1 read, 2 DCT row, 3 DCT column, 4 Haar transform (with the denoising and
//   deflicker thresholds), 5 reverse Haar, 6 IDCT row, 7 IDCT column, 8 write
// and is written back to its place in the buffer 8 clocks after its last
// byte. The Haar pairing restarts with the first active block of every band. Blocks in the horizontal blanking (which hold the timing codes) are
// not processed. Every byte is treated as one pixel, so the Cb Y Cr Y samples
// of a 4:2:2 stream share a block: this keeps the buffer at the published
// 6,864 bytes. The schedule and buffer size follow the published design; the
// addressing, the active-region rule and the byte-as-pixel treatment are
// this design's own.
//
// Interface: data_in is one byte per clock, continuously. delay_amount must
// not exceed MAX_DELAY (it is clamped), so that each block is written back
// before it is read out. data_out/out_hs are one clock behind e_hs.
// blk_start/blk_done pulse when a block enters the pipeline / is written back.
module delay_process
  import vsync_pkg::*;
#(
  parameter int LINE_BYTES   = 1716,
  parameter int ACTIVE_START = 276,
  parameter int MAX_DELAY    = LINE_BYTES - 16,
  localparam int CW          = $clog2(LINE_BYTES),
  localparam int DW          = $clog2(MAX_DELAY + 4),
  localparam int ENTRIES     = LINE_BYTES / BLK,
  localparam int AW          = $clog2(ENTRIES),
  localparam int PIPE        = 8   // clocks from the last byte to write-back
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pix_t          data_in,
  input  logic          e_hs,
  input  logic [DW-1:0] delay_amount,
  input  nr_cfg_t       cfg,
  output pix_t          data_out,
  output logic          out_hs,
  output logic          blk_start,
  output logic          blk_done
);

  if (LINE_BYTES % BLK != 0 || ACTIVE_START % BLK != 0) begin : g_bad_geometry
    $error("LINE_BYTES and ACTIVE_START must be multiples of 4");
  end
  if (MAX_DELAY > LINE_BYTES - 3 * PIPE / 2) begin : g_bad_delay
    $error("MAX_DELAY too large: a block would be read out before write-back");
  end

  // ---------------- electrical position --------------------------------
  logic [CW-1:0] col_q, col_c;
  logic [1:0]    row_q, row_c;

  always_comb begin
    if (e_hs || col_q == CW'(LINE_BYTES - 1)) begin
      col_c = '0;
      row_c = row_q + 2'd1;
    end else begin
      col_c = col_q + 1'b1;
      row_c = row_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= CW'(LINE_BYTES - 1);
      row_q <= 2'd3;
    end else begin
      col_q <= col_c;
      row_q <= row_c;
    end
  end

  // ---------------- write position = electrical - delay ----------------
  logic [DW-1:0] dly;
  logic [CW-1:0] wcol;
  logic [1:0]    wrow;

  always_comb begin
    dly = (delay_amount > DW'(MAX_DELAY)) ? DW'(MAX_DELAY) : delay_amount;
    if ((CW+1)'(col_c) >= (CW+1)'(dly)) begin
      wcol = CW'((CW+1)'(col_c) - (CW+1)'(dly));
      wrow = row_c;
    end else begin
      wcol = CW'((CW+1)'(col_c) + (CW+1)'(LINE_BYTES) - (CW+1)'(dly));
      wrow = row_c - 2'd1;
    end
  end

  // ---------------- block launch ----------------------------------------
  logic          launch_q;
  logic [AW-1:0] ent_pipe [PIPE];   // entry index travelling with the block
  logic          last_byte;

  assign last_byte = (wrow == 2'd3) && (wcol[1:0] == 2'd3) &&
                     (wcol >= CW'(ACTIVE_START));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) launch_q <= 1'b0;
    else        launch_q <= last_byte;
  end

  always_ff @(posedge clk) begin
    ent_pipe[0] <= AW'(wcol >> 2);
    for (int i = 1; i < PIPE; i++) ent_pipe[i] <= ent_pipe[i-1];
  end

  // ---------------- buffer ----------------------------------------------
  pix_blk_t rd_blk, wb_blk;
  logic     rd_valid;

  logic     wb_valid;
  blk_t     wb_coef;

  block_buffer #(.LINE_BYTES(LINE_BYTES)) u_buf (
    .clk,
    .wr_en        (1'b1),
    .wr_entry     (AW'(wcol >> 2)),
    .wr_lane      ({wrow, wcol[1:0]}),
    .wr_data      (data_in),
    .rd_en        (1'b1),
    .rd_entry     (AW'(col_c >> 2)),
    .rd_lane      ({row_c, col_c[1:0]}),
    .rd_data      (data_out),
    .blk_rd_en    (launch_q),
    .blk_rd_entry (ent_pipe[0]),
    .blk_rd_data  (rd_blk),
    .blk_wr_en    (wb_valid),
    .blk_wr_entry (ent_pipe[PIPE-1]),
    .blk_wr_data  (wb_blk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      out_hs   <= 1'b0;
    end else begin
      rd_valid <= launch_q;
      out_hs   <= e_hs;
    end
  end

  // ---------------- processing pipeline ---------------------------------
  blk_t in_coef, dct_blk, dn_blk, hr_blk;
  logic dct_valid, hr_valid;

  always_comb begin
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        in_coef[r][c] = pix_to_coef(rd_blk[r*BLK + c]);
  end

  dct2d u_dct (
    .clk, .rst_n, .in_valid(rd_valid), .in_blk(in_coef),
    .out_valid(dct_valid), .out_blk(dct_blk)
  );

  coef_threshold u_dn (
    .en(cfg.dn_en), .thr(cfg.dn_thr), .in_blk(dct_blk), .out_blk(dn_blk)
  );

  haar_deflicker u_haar (
    .clk, .rst_n, .en(cfg.fl_en), .thr(cfg.fl_thr),
    .in_valid(dct_valid), .in_first(ent_pipe[3] == AW'(ACTIVE_START / BLK)),
    .in_blk(dn_blk),
    .out_valid(hr_valid), .out_blk(hr_blk)
  );

  idct2d u_idct (
    .clk, .rst_n, .in_valid(hr_valid), .in_blk(hr_blk),
    .out_valid(wb_valid), .out_blk(wb_coef)
  );

  always_comb begin
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        wb_blk[r*BLK + c] = coef_to_pix(wb_coef[r][c]);
  end

  // The delay must stay in the range in which every block is written back
  // before the output reaches it (the comparator never reports more).
  a_delay_range: assert property (@(posedge clk) disable iff (!rst_n)
    delay_amount <= DW'(MAX_DELAY))
    else $error("delay_amount %0d above MAX_DELAY", delay_amount);

  assign blk_start = launch_q;
  assign blk_done  = wb_valid;

endmodule
