// tb_dct2d: drives random 4x4 blocks into the 2D DCT back to back, one per
// clock, and checks every output block against the fixed-point reference
// (exact) and that it appears exactly 2 clocks after its input. For blocks of
// pixel-range data it also compares the row pass and the full 2D result with
// the ideal real-valued transform (within 2 and 4 LSB) and reports the
// largest error of each, normalised to one pixel step.
module tb_dct2d;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  blk_t in_blk, out_blk;
  int checks = 0, failures = 0;
  int cyc = 0;

  dct2d dut (.clk, .rst_n, .in_valid, .in_blk, .out_valid, .out_blk);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("largest error against the ideal DCT: row pass %f, 2D %f pixel steps",
             max_err_row / 16.0, max_err_2d / 16.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    ideal_q [$];   // 16 ideal 2D values per pixel-range block
  bit     isp_q [$];
  real    max_err_row = 0.0, max_err_2d = 0.0;

  // row pass against its ideal values (combinational view of the first pass)
  always @(posedge clk) begin
    if (rst_n && dut.row_valid && row_ideal_q.size() > 0) begin
      real ri [16];
      for (int j = 0; j < 16; j++) ri[j] = row_ideal_q.pop_front();
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          real e;
          e = rabs(real'(dut.row_blk[r][c]) - ri[r*4 + c]);
          if (e > max_err_row) max_err_row = e;
          checks++;
          if (e > 2.0) begin
            failures++;
            $display("FAIL row pass [%0d][%0d] got %0d ideal %f", r, c, dut.row_blk[r][c], ri[r*4 + c]);
          end
        end
    end
  end

  real row_ideal_q [$];   // 16 ideal row-pass values per block

  blk64_t exp_q [$];
  int     t_q   [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      blk64_t e;
      int t;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (cyc - t != 2) begin
          failures++;
          $display("FAIL latency %0d", cyc - t);
        end
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            if (longint'(out_blk[r][c]) != e[r][c]) begin
              failures++;
              $display("FAIL [%0d][%0d] got %0d exp %0d", r, c, out_blk[r][c], e[r][c]);
            end
        if (isp_q.pop_front()) begin
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) begin
              real id, er;
              id = ideal_q.pop_front();
              er = rabs(real'(out_blk[r][c]) - id);
              if (er > max_err_2d) max_err_2d = er;
              checks++;
              if (er > 4.0) begin
                failures++;
                $display("FAIL 2D [%0d][%0d] got %0d ideal %f", r, c, out_blk[r][c], id);
              end
            end
        end
      end
    end
  end

  initial begin
    blk64_t b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          b[r][c] = (i < 100) ? longint'($urandom_range(0, 255)) * 16
                              : longint'($urandom_range(0, 20000)) - 10000;
          in_blk[r][c] = coef_t'(b[r][c]);
        end
      if (in_valid) begin
        exp_q.push_back(fdct2(b));
        t_q.push_back(cyc);
        isp_q.push_back(i < 100);
        begin
          real xr [4][4], tr [4][4];
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) xr[r][c] = real'(longint'(b[r][c]));
          for (int r = 0; r < 4; r++)
            for (int k = 0; k < 4; k++) begin
              tr[r][k] = rdct(xr[r][0], xr[r][1], xr[r][2], xr[r][3], k);
              row_ideal_q.push_back(tr[r][k]);
            end
          if (i < 100)
            for (int k = 0; k < 4; k++)
              for (int c = 0; c < 4; c++)
                ideal_q.push_back(rdct(tr[0][c], tr[1][c], tr[2][c], tr[3][c], k));
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks never came out", exp_q.size());
    end
    $display("largest error against the ideal DCT: row pass %f, 2D %f pixel steps",
             max_err_row / 16.0, max_err_2d / 16.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
