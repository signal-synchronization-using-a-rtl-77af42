// tb_delay_process: the delay control and process block on a small line
// format (64-byte lines, active picture from column 16). A source model feeds
// two instances through optical delays of 13 and 48 (= MAX_DELAY) clocks:
//   * dut_nr: denoising and deflicker on; every output byte is compared with
//     a reference that rebuilds each 4-line band from the bytes sent
//     (fixed-point DCT, threshold, Haar pairing, IDCT);
//   * dut_dn: denoising only (deflicker off), checked the same way;
//   * dut_id: both stages off; the output must equal the input exactly.
// In both, output line n must appear with electrical line n+4, one clock
// after e_hs; every active block must be written back 7 clocks after it
// enters the pipeline (8-clock schedule, read to write).
module tb_delay_process;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  localparam int LINE    = 64;
  localparam int ACT     = 16;
  localparam int MAXD    = 48;
  localparam int FRAME   = 40;
  localparam int LINES   = 3 * FRAME + 8;
  localparam int DW      = $clog2(MAXD + 4);
  localparam int D_NR    = 13;
  localparam int D_ID    = MAXD;
  localparam int DN_THR  = 40;
  localparam int FL_THR  = 48;

  logic clk = 0, rst_n = 0;
  logic [7:0] tx_data;
  logic e_hs, e_field;
  int   line_abs, col;

  video_tx_model #(.LINE_BYTES(LINE), .ACTIVE_START(ACT), .LINES_FRAME(FRAME),
                   .FIELD2_START(FRAME / 2), .VBLANK(2)) u_tx (
    .clk, .rst_n, .tx_data, .e_hs, .e_field, .line_abs, .col);

  // optical delay lines
  pix_t dl [64];
  always_ff @(posedge clk) begin
    dl[0] <= tx_data;
    for (int k = 1; k < 64; k++) dl[k] <= dl[k-1];
  end

  nr_cfg_t cfg_nr, cfg_id, cfg_dn;
  assign cfg_dn = '{dn_en: 1'b1, dn_thr: coef_t'(DN_THR), fl_en: 1'b0, fl_thr: coef_t'(FL_THR)};
  assign cfg_nr = '{dn_en: 1'b1, dn_thr: coef_t'(DN_THR), fl_en: 1'b1, fl_thr: coef_t'(FL_THR)};
  assign cfg_id = '{dn_en: 1'b0, dn_thr: coef_t'(DN_THR), fl_en: 1'b0, fl_thr: coef_t'(FL_THR)};

  pix_t out_nr, out_id, out_dn;
  logic hs_dn, bs_dn, bd_dn;
  logic hs_nr, hs_id, bs_nr, bd_nr, bs_id, bd_id;

  delay_process #(.LINE_BYTES(LINE), .ACTIVE_START(ACT), .MAX_DELAY(MAXD)) dut_nr (
    .clk, .rst_n, .data_in(dl[D_NR-1]), .e_hs, .delay_amount(DW'(D_NR)), .cfg(cfg_nr),
    .data_out(out_nr), .out_hs(hs_nr), .blk_start(bs_nr), .blk_done(bd_nr));

  delay_process #(.LINE_BYTES(LINE), .ACTIVE_START(ACT), .MAX_DELAY(MAXD)) dut_dn (
    .clk, .rst_n, .data_in(dl[D_NR-1]), .e_hs, .delay_amount(DW'(D_NR)), .cfg(cfg_dn),
    .data_out(out_dn), .out_hs(hs_dn), .blk_start(bs_dn), .blk_done(bd_dn));

  delay_process #(.LINE_BYTES(LINE), .ACTIVE_START(ACT), .MAX_DELAY(MAXD)) dut_id (
    .clk, .rst_n, .data_in(dl[D_ID-1]), .e_hs, .delay_amount(DW'(D_ID)), .cfg(cfg_id),
    .data_out(out_id), .out_hs(hs_id), .blk_start(bs_id), .blk_done(bd_id));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mode_diff = 0;
  int dn_clears = 0, fl_clears = 0, blocks_nr = 0, blocks_id = 0, raw_bytes = 0, proc_bytes = 0;

  initial begin
    repeat (LINES * LINE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned sent [];
  int           proc [];
  int           proc_dn [];
  bit           band_done [];

  task automatic build_band(int g);
    blk64_t prev;
    bit     prev_ok = 0;
    for (int e = ACT / 4; e < LINE / 4; e++) begin
      blk64_t b, bd;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) b[r][c] = 16 * longint'(sent[(4*g + r) * LINE + 4*e + c]);
      b = fdct2(b);
      dn_clears += thr_blk(b, 1, DN_THR);
      bd = fidct2(b);
      fl_clears += haar_blk(b, prev, prev_ok, 1, FL_THR, e == ACT / 4);
      b = fidct2(b);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          proc[(4*g + r) * LINE + 4*e + c]    = int'(to_pix(b[r][c]));
          proc_dn[(4*g + r) * LINE + 4*e + c] = int'(to_pix(bd[r][c]));
        end
    end
    band_done[g] = 1;
  endtask

  int prev_line = -1, prev_col = 0, cyc = 0;
  int start_nr [$], start_id [$];

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      sent[line_abs * LINE + col] = tx_data;
      // output alignment: one clock after e_hs
      checks++;
      if (hs_nr != (prev_line >= 0 && prev_col == 0) || hs_id != hs_nr) begin
        failures++;
        $display("FAIL out_hs at line %0d col %0d", prev_line, prev_col);
      end
      if (prev_line >= 4) begin
        int src;
        src = (prev_line - 4) * LINE + prev_col;
        if (prev_col < ACT) begin
          raw_bytes++;
          checks++;
          if (out_nr != sent[src]) begin
            failures++;
            $display("FAIL blanking line %0d col %0d got %h exp %h", prev_line, prev_col, out_nr, sent[src]);
          end
        end else begin
          int g;
          g = (prev_line - 4) / 4;
          if (!band_done[g]) build_band(g);
          proc_bytes++;
          checks++;
          if (int'(out_nr) != proc[src]) begin
            failures++;
            if (failures < 20)
              $display("FAIL processed line %0d col %0d got %0d exp %0d", prev_line, prev_col, out_nr, proc[src]);
          end
          checks++;
          if (int'(out_dn) != proc_dn[src]) begin
            failures++;
            if (failures < 20)
              $display("FAIL denoised line %0d col %0d got %0d exp %0d", prev_line, prev_col, out_dn, proc_dn[src]);
          end
          if (proc_dn[src] != proc[src]) mode_diff++;
        end
        checks++;
        if (out_id != sent[src]) begin
          failures++;
          if (failures < 20)
            $display("FAIL identity line %0d col %0d got %0d exp %0d", prev_line, prev_col, out_id, sent[src]);
        end
      end
      prev_line <= line_abs;
      prev_col  <= col;
      // pipeline latency
      if (bs_nr) start_nr.push_back(cyc);
      if (bs_id) start_id.push_back(cyc);
      if (bd_nr) begin
        blocks_nr++;
        checks++;
        if (start_nr.size() == 0 || cyc - start_nr.pop_front() != 7) begin
          failures++; $display("FAIL pipeline latency (nr)");
        end
      end
      if (bd_id) begin
        blocks_id++;
        checks++;
        if (start_id.size() == 0 || cyc - start_id.pop_front() != 7) begin
          failures++; $display("FAIL pipeline latency (id)");
        end
      end
    end
  end

  initial begin
    sent = new[(LINES + 2) * LINE];
    proc = new[(LINES + 2) * LINE];
    proc_dn = new[(LINES + 2) * LINE];
    band_done = new[LINES / 4 + 2];
    for (int k = 0; k < 64; k++) dl[k] = 8'h00;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (line_abs == LINES);
    // every completed band of the active picture went through the pipeline
    checks += 7;
    if (mode_diff == 0) begin failures++; $display("FAIL deflicker never changed the denoised picture"); end
    if (blocks_nr < (LINES / 4 - 1) * (LINE - ACT) / 4) begin
      failures++; $display("FAIL only %0d blocks processed", blocks_nr);
    end
    if (blocks_id < (LINES / 4 - 1) * (LINE - ACT) / 4) begin
      failures++; $display("FAIL only %0d blocks processed (identity)", blocks_id);
    end
    if (dn_clears == 0) begin failures++; $display("FAIL denoising threshold never acted"); end
    if (fl_clears == 0) begin failures++; $display("FAIL flicker threshold never acted"); end
    if (raw_bytes == 0) begin failures++; $display("FAIL no blanking byte checked"); end
    if (proc_bytes == 0) begin failures++; $display("FAIL no processed byte checked"); end
    $display("blocks=%0d dn_clears=%0d fl_clears=%0d raw=%0d processed=%0d",
             blocks_nr, dn_clears, fl_clears, raw_bytes, proc_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
