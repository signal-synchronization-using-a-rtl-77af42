// tb_haar_deflicker: streams coefficient blocks (with gaps) through the Haar
// stage; checks every output against the reference pairing with the previous
// block, the 2-clock latency, smoothing of small block-to-block changes,
// survival of large ones, and exact pass-through when disabled.
module tb_haar_deflicker;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  en = 0;
  coef_t thr = '0;
  logic  in_valid = 0, in_first = 0, out_valid;
  blk_t  in_blk, out_blk;
  int checks = 0, failures = 0, cyc = 0, smoothed = 0;

  haar_deflicker dut (.clk, .rst_n, .en, .thr, .in_valid, .in_first, .in_blk, .out_valid, .out_blk);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk64_t exp_q [$];
  int     t_q   [$];
  blk64_t prev;
  bit     prev_ok = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      blk64_t e;
      int t;
      checks++;
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
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (longint'(out_blk[r][c]) != longint'(e[r][c])) begin
              failures++;
              $display("FAIL [%0d][%0d] got %0d exp %0d", r, c, out_blk[r][c], longint'(e[r][c]));
            end
          end
      end
    end
  end

  initial begin
    blk64_t b, base, orig;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) base[r][c] = longint'($urandom_range(0, 8000)) - 4000;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en       = (i >= 20);
      thr      = coef_t'((i < 200) ? 64 : 16);
      in_valid = ($urandom_range(0, 3) != 0);
      in_first = (i % 23 == 5);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          // flicker: small random change around a base; sometimes a scene cut
          // or extreme values
          if (i % 50 == 49) b[r][c] = (($urandom_range(0, 1) != 0) ? 32767 : -32768);
          else if (i % 37 == 0) b[r][c] = longint'($urandom_range(0, 8000)) - 4000;
          else b[r][c] = base[r][c] + longint'($urandom_range(0, 100)) - 50;
          in_blk[r][c] = coef_t'(b[r][c]);
        end
      if (in_valid) begin
        orig = b;
        smoothed += haar_blk(b, prev, prev_ok, en, longint'(thr), in_first);
        exp_q.push_back(b);
        t_q.push_back(cyc);
        if (!en) begin
          // disabled: exact pass-through
          checks++;
          if (b != orig) begin
            failures++;
            $display("FAIL reference changes data while disabled");
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks never came out", exp_q.size());
    end
    if (smoothed == 0) begin
      failures++;
      $display("FAIL no detail was ever cleared");
    end
    $display("smoothed details: %0d", smoothed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
