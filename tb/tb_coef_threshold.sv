// tb_coef_threshold: random coefficient blocks and thresholds; checks that AC
// coefficients below the threshold are cleared, all others (and the DC term)
// pass, and that nothing changes when the stage is disabled.
module tb_coef_threshold;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  logic  en;
  coef_t thr;
  blk_t  in_blk, out_blk;
  int checks = 0, failures = 0, cleared = 0;

  coef_threshold dut (.en, .thr, .in_blk, .out_blk);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk64_t b;
    for (int i = 0; i < 500; i++) begin
      en  = (i % 5 != 0);
      thr = coef_t'($urandom_range(0, 400));
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          // mostly small values, some exactly at the threshold, some extremes
          case ($urandom_range(0, 5))
            0:       b[r][c] = thr;
            1:       b[r][c] = -longint'(thr);
            2:       b[r][c] = (($urandom_range(0, 1) != 0) ? 32767 : -32768);
            default: b[r][c] = longint'($urandom_range(0, 1000)) - 500;
          endcase
          in_blk[r][c] = coef_t'(b[r][c]);
        end
      #1;
      cleared += thr_blk(b, en, longint'(thr));
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (longint'(out_blk[r][c]) != longint'(b[r][c])) begin
            failures++;
            $display("FAIL en=%0b thr=%0d [%0d][%0d] in=%0d out=%0d exp=%0d",
                     en, thr, r, c, in_blk[r][c], out_blk[r][c], b[r][c]);
          end
        end
    end
    checks++;
    if (cleared == 0) begin
      failures++;
      $display("FAIL no coefficient was ever cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
