// tb_idct1d: checks the 1D IDCT unit against the specified fixed-point result
// (exact) and the ideal real-valued IDCT (within 2 LSB), and that a DCT/IDCT
// round trip of pixel-range data returns the input within 2 LSB.
module tb_idct1d;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  coef_t c [4], y [4], w [4], xn;
  int checks = 0, failures = 0;

  idct1d dut (.c, .y, .w, .xn);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint yv [4], input longint orig [4], input bit chk_orig);
    for (int n = 0; n < 4; n++) begin
      longint exp;
      real    ideal;
      for (int k = 0; k < 4; k++) begin
        c[k] = coef_t'(rcos(k, n));
        y[k] = coef_t'(yv[k]);
        w[k] = coef_t'(rw(k));
      end
      #1;
      exp   = fidct(yv[0], yv[1], yv[2], yv[3], n);
      ideal = ridct(real'(yv[0]), real'(yv[1]), real'(yv[2]), real'(yv[3]), n);
      checks += 2;
      if (longint'(xn) != exp) begin
        failures++;
        $display("FAIL n=%0d y=%p x=%0d exp=%0d", n, yv, xn, exp);
      end
      if (rabs(real'(xn) - ideal) > 2.0) begin
        failures++;
        $display("FAIL ideal n=%0d x=%0d ideal=%f", n, xn, ideal);
      end
      if (chk_orig) begin
        checks++;
        if (iabs(longint'(xn) - orig[n]) > 2) begin
          failures++;
          $display("FAIL round trip n=%0d x=%0d orig=%0d", n, xn, orig[n]);
        end
      end
    end
  endtask

  initial begin
    longint yv [4], xv [4];
    yv = '{8192, 0, 0, 0};   // DC only: flat output 8192*0.5 = 4096
    xv = '{4096, 4096, 4096, 4096};
    run(yv, xv, 1);
    for (int i = 0; i < 300; i++) begin
      for (int n = 0; n < 4; n++) xv[n] = longint'($urandom_range(0, 255)) * 16;
      for (int k = 0; k < 4; k++) yv[k] = fdct(xv[0], xv[1], xv[2], xv[3], k);
      run(yv, xv, 1);
    end
    for (int i = 0; i < 100; i++) begin
      for (int k = 0; k < 4; k++) yv[k] = longint'($urandom_range(0, 16000)) - 8000;
      run(yv, xv, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
