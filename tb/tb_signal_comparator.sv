// tb_signal_comparator: a small ITU-R 656-style source sends its stream
// through a delay line of D clocks while its field signal goes straight to
// the comparator. For several D (including 0 and a value beyond MAX_DELAY)
// the reported delay must equal D, be updated each field, and the over-range
// flag must be raised only when D > MAX_DELAY.
module tb_signal_comparator;
  import vsync_pkg::*;

  localparam int MAX_DELAY = 60;
  localparam int LINE      = 80;
  localparam int LINES     = 6;     // lines per field
  localparam int DW        = $clog2(MAX_DELAY + 4);

  logic clk = 0, rst_n = 0;
  pix_t opt_data;
  logic e_field;
  logic [DW-1:0] delay_amount;
  logic delay_valid, delay_over, opt_field;
  int checks = 0, failures = 0;

  signal_comparator #(.MAX_DELAY(MAX_DELAY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  int   col = 0, line = 0;
  logic field = 0;
  pix_t tx;
  int   dly = 5;
  pix_t pipe [256];

  always_comb begin
    logic f;
    // the first line of a field carries the new F bit from its first code on
    f = field;
    case (col)
      0: tx = 8'hFF; 1: tx = 8'h00; 2: tx = 8'h00; 3: tx = {1'b1, f, 1'b0, 1'b1, 4'h0};
      20: tx = 8'hFF; 21: tx = 8'h00; 22: tx = 8'h00; 23: tx = {1'b1, f, 1'b0, 1'b0, 4'h0};
      default: tx = (col < 20) ? 8'h80 : pix_t'(col * 7 + line);
    endcase
  end
  assign e_field  = field;
  assign opt_data = (dly == 0) ? tx : pipe[dly-1];   // tx delayed by dly clocks

  always_ff @(posedge clk) begin
    pipe[0] <= tx;   // pipe[k] is tx delayed by k+1 clocks
    for (int k = 1; k < 256; k++) pipe[k] <= pipe[k-1];
    if (col == LINE - 1) begin
      col <= 0;
      if (line == LINES - 1) begin line <= 0; field <= ~field; end
      else line <= line + 1;
    end else col <= col + 1;
  end

  initial begin
    int ds [5] = '{5, 0, 17, 60, 70};
    for (int k = 0; k < 256; k++) pipe[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ds[i]) begin
      dly = ds[i];
      // wait two field changes so a whole measurement uses this delay
      repeat (2) begin
        @(posedge clk iff (col == 0 && line == 0));
        @(posedge clk);
      end
      repeat (LINE * 2) @(posedge clk);
      checks += 3;
      if (!delay_valid) begin
        failures++; $display("FAIL D=%0d: no measurement", ds[i]);
      end
      if (ds[i] <= MAX_DELAY) begin
        if (delay_amount != DW'(ds[i]) || delay_over) begin
          failures++;
          $display("FAIL D=%0d: measured %0d over=%0b", ds[i], delay_amount, delay_over);
        end
      end else begin
        if (!delay_over || delay_amount != DW'(MAX_DELAY)) begin
          failures++;
          $display("FAIL D=%0d: over-range not flagged (%0d, %0b)", ds[i], delay_amount, delay_over);
        end
      end
      if (opt_field != field) begin
        failures++; $display("FAIL D=%0d: optical field bit %0b, field %0b", ds[i], opt_field, field);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
