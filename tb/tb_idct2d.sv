// tb_idct2d: drives random 4x4 blocks into the 2D IDCT back to back, one per
// clock, and checks every output block against the fixed-point reference
// (exact) and that it appears exactly 2 clocks after its input.
module tb_idct2d;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  blk_t in_blk, out_blk;
  int checks = 0, failures = 0;
  int cyc = 0;

  idct2d dut (.clk, .rst_n, .in_valid, .in_blk, .out_valid, .out_blk);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
        exp_q.push_back(fidct2(b));
        t_q.push_back(cyc);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
