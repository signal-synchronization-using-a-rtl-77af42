// tb_sync_rx_top: end-to-end test of the receiver synchronization block,
// on a reduced line format (64-byte lines, active picture from column 16,
// 40-line frames, three frames).
// A source model sends a 656-style stream over an optical delay of D clocks
// while its line and field signals reach the receiver directly. Instances:
//   * dut_nr (D=21): denoising and deflicker on. The measured delay must
//     equal D at every field; every output byte from output line 8 on must
//     match a reference built from the bytes sent (blanking unchanged, active
//     picture through fixed-point DCT, threshold, Haar pairing and IDCT) and
//     appear with electrical line n+4, one clock after e_hs.
//   * dut_id (D=21): both stages off; output must equal input exactly;
//   * dut_ov (D=MAX_DELAY+9): the comparator must flag the delay as over range.
// The run counts each mechanism (delay measurement, block pipeline,
// denoising threshold, flicker threshold, blanking pass-through, over-range
// delay, identity mode) and
// fails if one never happened.
module tb_sync_rx_top;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  localparam int LINE    = 64;
  localparam int ACT     = 16;
  localparam int FRAME   = 40;
  localparam int LINES   = 128;
  localparam int MAXD    = LINE - 16;
  localparam int DW      = $clog2(MAXD + 4);
  localparam int D       = 21;
  localparam int D_OVR   = MAXD + 9;
  localparam int DN_THR  = 40;
  localparam int FL_THR  = 48;

  logic clk = 0, rst_n = 0;
  logic [7:0] tx_data;
  logic e_hs, e_field;
  int   line_abs, col;

  video_tx_model #(.LINE_BYTES(LINE), .ACTIVE_START(ACT), .LINES_FRAME(FRAME),
                   .FIELD2_START((FRAME + 1) / 2), .VBLANK(2)) u_tx (
    .clk, .rst_n, .tx_data, .e_hs, .e_field, .line_abs, .col);

  pix_t dl [D_OVR];
  always_ff @(posedge clk) begin
    dl[0] <= tx_data;
    for (int k = 1; k < D_OVR; k++) dl[k] <= dl[k-1];
  end

  nr_cfg_t cfg_nr, cfg_id;
  assign cfg_nr = '{dn_en: 1'b1, dn_thr: coef_t'(DN_THR), fl_en: 1'b1, fl_thr: coef_t'(FL_THR)};
  assign cfg_id = '{dn_en: 1'b0, dn_thr: coef_t'(DN_THR), fl_en: 1'b0, fl_thr: coef_t'(FL_THR)};

  pix_t          vid_nr;
  logic          hs_nr, fld_nr, dv_nr, dov_nr, bs_nr, bd_nr, of_nr;
  logic [DW-1:0] dly_nr;

  sync_rx_top #(.LINE_BYTES(LINE), .ACTIVE_START(ACT)) dut_nr (
    .clk, .rst_n, .opt_data(dl[D-1]), .e_hs, .e_field, .cfg(cfg_nr),
    .vid_out(vid_nr), .out_hs(hs_nr), .out_field(fld_nr), .delay_amount(dly_nr),
    .delay_valid(dv_nr), .delay_over(dov_nr), .blk_start(bs_nr), .blk_done(bd_nr),
    .opt_field(of_nr));

  pix_t          vid_id;
  logic          hs_id, fld_id, dv_id, dov_id, bs_id, bd_id, of_id;
  logic [DW-1:0] dly_id;

  sync_rx_top #(.LINE_BYTES(LINE), .ACTIVE_START(ACT)) dut_id (
    .clk, .rst_n, .opt_data(dl[D-1]), .e_hs, .e_field, .cfg(cfg_id),
    .vid_out(vid_id), .out_hs(hs_id), .out_field(fld_id), .delay_amount(dly_id),
    .delay_valid(dv_id), .delay_over(dov_id), .blk_start(bs_id), .blk_done(bd_id),
    .opt_field(of_id));

  pix_t          vid_ov;
  logic          hs_ov, fld_ov, dv_ov, dov_ov, bs_ov, bd_ov, of_ov;
  logic [DW-1:0] dly_ov;

  sync_rx_top #(.LINE_BYTES(LINE), .ACTIVE_START(ACT)) dut_ov (
    .clk, .rst_n, .opt_data(dl[D_OVR-1]), .e_hs, .e_field, .cfg(cfg_nr),
    .vid_out(vid_ov), .out_hs(hs_ov), .out_field(fld_ov), .delay_amount(dly_ov),
    .delay_valid(dv_ov), .delay_over(dov_ov), .blk_start(bs_ov), .blk_done(bd_ov),
    .opt_field(of_ov));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int dn_clears = 0, fl_clears = 0, blocks = 0, raw_bytes = 0, proc_bytes = 0;
  int measurements = 0, id_bytes = 0, over_seen = 0;

  initial begin
    repeat (LINES * LINE + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned sent [];
  byte unsigned proc [];
  bit           band_done [];

  task automatic build_band(int g);
    blk64_t prev;
    bit     prev_ok = 0;
    for (int e = ACT / 4; e < LINE / 4; e++) begin
      blk64_t b;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) b[r][c] = 16 * longint'(sent[(4*g + r) * LINE + 4*e + c]);
      b = fdct2(b);
      dn_clears += thr_blk(b, 1, DN_THR);
      fl_clears += haar_blk(b, prev, prev_ok, 1, FL_THR, e == ACT / 4);
      b = fidct2(b);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) proc[(4*g + r) * LINE + 4*e + c] = 8'(to_pix(b[r][c]));
    end
    band_done[g] = 1;
  endtask

  int  prev_line = -1, prev_col = 0;
  logic of_q = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      sent[line_abs * LINE + col] = tx_data;
      // a new measurement completes when the optical field bit changes
      of_q <= of_nr;
      if (of_q != of_nr) begin
        measurements++;
      end
      if (of_q != of_nr && line_abs > 0) begin
        checks++;
        if (!dv_nr || dly_nr != DW'(D) || dov_nr) begin
          failures++;
          $display("FAIL measured delay %0d (valid %0b over %0b), expected %0d", dly_nr, dv_nr, dov_nr, D);
        end
      end
      if (prev_line >= 0) begin
        checks++;
        if (hs_nr != (prev_col == 0) || fld_nr != e_field_q) begin
          failures++;
          $display("FAIL timing outputs at line %0d col %0d", prev_line, prev_col);
        end
      end
      if (prev_line >= 8) begin
        int src;
        src = (prev_line - 4) * LINE + prev_col;
        checks++;
        if (prev_col < ACT) begin
          raw_bytes++;
          if (vid_nr != sent[src]) begin
            failures++;
            if (failures < 20)
              $display("FAIL blanking line %0d col %0d got %h exp %h", prev_line, prev_col, vid_nr, sent[src]);
          end
        end else begin
          int g;
          g = (prev_line - 4) / 4;
          if (!band_done[g]) build_band(g);
          proc_bytes++;
          if (vid_nr != proc[src]) begin
            failures++;
            if (failures < 20)
              $display("FAIL processed line %0d col %0d got %0d exp %0d", prev_line, prev_col, vid_nr, proc[src]);
          end
        end
        checks++;
        id_bytes++;
        if (vid_id != sent[src]) begin
          failures++;
          if (failures < 20)
            $display("FAIL identity line %0d col %0d got %h exp %h", prev_line, prev_col, vid_id, sent[src]);
        end
      end
      prev_line <= line_abs;
      prev_col  <= col;
      if (bd_nr) blocks++;
    end
  end

  logic e_field_q = 0;
  always @(posedge clk) e_field_q <= e_field;

  initial begin
    sent = new[(LINES + 2) * LINE];
    proc = new[(LINES + 2) * LINE];
    band_done = new[LINES / 4 + 2];
    for (int k = 0; k < D_OVR; k++) dl[k] = 8'h00;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (line_abs == LINES);
    checks += 6;
    if (measurements < 2)  begin failures++; $display("FAIL only %0d delay measurements", measurements); end
    if (blocks == 0)       begin failures++; $display("FAIL no block processed"); end
    if (dn_clears == 0)    begin failures++; $display("FAIL denoising threshold never acted"); end
    if (fl_clears == 0)    begin failures++; $display("FAIL flicker threshold never acted"); end
    if (raw_bytes == 0)    begin failures++; $display("FAIL no blanking byte checked"); end
    if (proc_bytes == 0)   begin failures++; $display("FAIL no processed byte checked"); end
    checks += 2;
    if (id_bytes == 0)     begin failures++; $display("FAIL no identity byte checked"); end
    if (!dov_ov || dly_ov != DW'(MAXD)) begin
      failures++; $display("FAIL over-range delay not flagged (%0d, %0b)", dly_ov, dov_ov);
    end else over_seen++;
    $display("measurements=%0d blocks=%0d dn_clears=%0d fl_clears=%0d raw=%0d processed=%0d identity=%0d over=%0d",
             measurements, blocks, dn_clears, fl_clears, raw_bytes, proc_bytes, id_bytes, over_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
