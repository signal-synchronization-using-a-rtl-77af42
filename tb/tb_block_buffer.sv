// tb_block_buffer: random traffic on all four ports of a small buffer,
// checked against a byte-array shadow model: registered reads return the
// contents before a same-clock write, a whole 4x4 block is read and written in
// one clock, and the byte write wins over a block write on the same byte.
module tb_block_buffer;
  import vsync_pkg::*;

  localparam int LINE_BYTES = 40;
  localparam int ENTRIES    = LINE_BYTES / 4;
  localparam int AW         = $clog2(ENTRIES);

  logic clk = 0;
  logic wr_en = 0, rd_en = 0, blk_rd_en = 0, blk_wr_en = 0;
  logic [AW-1:0] wr_entry = '0, rd_entry = '0, blk_rd_entry = '0, blk_wr_entry = '0;
  logic [3:0] wr_lane = '0, rd_lane = '0;
  pix_t wr_data = '0, rd_data;
  pix_blk_t blk_rd_data, blk_wr_data = '0;
  int checks = 0, failures = 0, collisions = 0;

  block_buffer #(.LINE_BYTES(LINE_BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned shadow [ENTRIES][16];

  initial begin
    byte unsigned exp_b;
    byte unsigned exp_blk [16];
    bit  chk_b, chk_blk;
    // fill through the byte port
    for (int e = 0; e < ENTRIES; e++)
      for (int l = 0; l < 16; l++) begin
        @(negedge clk);
        wr_en = 1; wr_entry = AW'(e); wr_lane = 4'(l);
        wr_data = pix_t'($urandom); shadow[e][l] = wr_data;
      end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_entry = AW'($urandom_range(0, ENTRIES-1));
      wr_lane = 4'($urandom); wr_data = pix_t'($urandom);
      rd_en = $urandom_range(0, 1); rd_entry = AW'($urandom_range(0, ENTRIES-1));
      rd_lane = 4'($urandom);
      blk_rd_en = $urandom_range(0, 1); blk_rd_entry = AW'($urandom_range(0, ENTRIES-1));
      blk_wr_en = $urandom_range(0, 1);
      blk_wr_entry = ($urandom_range(0, 3) == 0) ? wr_entry : AW'($urandom_range(0, ENTRIES-1));
      for (int l = 0; l < 16; l++) blk_wr_data[l] = pix_t'($urandom);
      // expected read data: contents before this clock's writes
      chk_b = rd_en; chk_blk = blk_rd_en;
      exp_b = shadow[rd_entry][rd_lane];
      for (int l = 0; l < 16; l++) exp_blk[l] = shadow[blk_rd_entry][l];
      if (blk_wr_en) for (int l = 0; l < 16; l++) shadow[blk_wr_entry][l] = blk_wr_data[l];
      if (wr_en) shadow[wr_entry][wr_lane] = wr_data;
      if (wr_en && blk_wr_en && wr_entry == blk_wr_entry) collisions++;
      @(posedge clk);
      #1;
      if (chk_b) begin
        checks++;
        if (rd_data != exp_b) begin
          failures++;
          $display("FAIL byte read got %h exp %h", rd_data, exp_b);
        end
      end
      if (chk_blk) begin
        checks++;
        for (int l = 0; l < 16; l++)
          if (blk_rd_data[l] != exp_blk[l]) begin
            failures++;
            $display("FAIL block read lane %0d got %h exp %h", l, blk_rd_data[l], exp_blk[l]);
          end
      end
    end
    checks++;
    if (collisions == 0) begin
      failures++;
      $display("FAIL byte/block write collision never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
