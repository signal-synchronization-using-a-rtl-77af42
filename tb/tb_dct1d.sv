// tb_dct1d: checks the 1D DCT unit against the specified fixed-point result
// (exact) and against the ideal real-valued DCT (within 2 LSB, i.e. 1/8 of a
// pixel step), for random and structured inputs and all four outputs k.
module tb_dct1d;
  import vsync_pkg::*;
  import tb_ref_pkg::*;

  coef_t c [4], x [4], wk, yk;
  int checks = 0, failures = 0;

  dct1d dut (.c, .x, .wk, .yk);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint xv [4]);
    for (int k = 0; k < 4; k++) begin
      longint exp;
      real    ideal;
      for (int n = 0; n < 4; n++) begin
        c[n] = coef_t'(rcos(k, n));
        x[n] = coef_t'(xv[n]);
      end
      wk = coef_t'(rw(k));
      #1;
      exp   = fdct(xv[0], xv[1], xv[2], xv[3], k);
      ideal = rdct(real'(xv[0]), real'(xv[1]), real'(xv[2]), real'(xv[3]), k);
      checks += 2;
      if (longint'(yk) != exp) begin
        failures++;
        $display("FAIL k=%0d x=%p y=%0d exp=%0d", k, xv, yk, exp);
      end
      if (rabs(real'(yk) - ideal) > 2.0) begin
        failures++;
        $display("FAIL ideal k=%0d x=%p y=%0d ideal=%f", k, xv, yk, ideal);
      end
    end
  endtask

  initial begin
    longint v [4];
    // constant input: only the DC output is non-zero
    v = '{4080, 4080, 4080, 4080};
    run(v);
    for (int k = 0; k < 4; k++) begin
      for (int n = 0; n < 4; n++) begin
        c[n] = coef_t'(rcos(k, n)); x[n] = 16'sd4080;
      end
      wk = coef_t'(rw(k));
      #1;
      checks++;
      if ((k == 0 && yk != 16'sd8160) || (k != 0 && yk != 0)) begin
        failures++;
        $display("FAIL constant k=%0d y=%0d", k, yk);
      end
    end
    v = '{-16000, 16000, -16000, 16000};
    run(v);
    for (int i = 0; i < 300; i++) begin
      for (int n = 0; n < 4; n++) v[n] = longint'($urandom_range(0, 32000)) - 16000;
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
