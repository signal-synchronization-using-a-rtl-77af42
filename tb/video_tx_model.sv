// video_tx_model: behavioural model of the transmitting side (video decoder
// plus transmitter FPGA), for testbenches only.
//
// It emits an 8-bit ITU-R 656-style stream, one byte per clock: each line of
// LINE_BYTES bytes starts with the end-of-active-video code FF 00 00 XY at
// columns 0..3, then horizontal blanking (80 10 ...), the start-of-active-
// video code at ACTIVE_START-4..ACTIVE_START-1 and the active samples. XY
// carries F (field), V (vertical blanking: the first VBLANK lines of each
// field) and H. The picture is a ramp with block edges, plus scattered noise
// on about one sample in four (amplitude NOISE) and a field-to-field
// brightness flicker of +-FLICKER; active samples are kept in 16..235 so that
// they never imitate a timing code.
// Alongside, it drives the electrical control signals: e_hs is high at
// column 0 of every line and e_field changes in the clock in which the first
// code of a new field is sent. line_abs/col tell the testbench which byte is
// being sent. The first byte after reset is line 0, column 0 of field 1.
module video_tx_model #(
  parameter int LINE_BYTES   = 1716,
  parameter int ACTIVE_START = 276,
  parameter int LINES_FRAME  = 525,
  parameter int FIELD2_START = 263,
  parameter int VBLANK       = 4,
  parameter int NOISE        = 12,
  parameter int FLICKER      = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] tx_data,
  output logic       e_hs,
  output logic       e_field,
  output int         line_abs,
  output int         col
);

  int   lin;          // line within the frame
  logic field;
  int   fields_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col         <= 0;
      lin         <= 0;
      line_abs    <= 0;
      fields_sent <= 0;
    end else if (col == LINE_BYTES - 1) begin
      col      <= 0;
      line_abs <= line_abs + 1;
      lin      <= (lin == LINES_FRAME - 1) ? 0 : lin + 1;
      if (lin == LINES_FRAME - 1 || lin == FIELD2_START - 1) fields_sent <= fields_sent + 1;
    end else begin
      col <= col + 1;
    end
  end

  // field 1 is F=1, field 2 is F=0, so the first code after reset is a change
  assign field   = (lin < FIELD2_START);
  assign e_field = rst_n && field;
  assign e_hs    = rst_n && (col == 0);

  // Deterministic pseudo-random noise per sample position.
  function automatic int unsigned hash(int a, int b);
    int unsigned x;
    x = int'(a) * 32'd1103515245 + int'(b) * 32'd12345 + 32'h5bd1e995;
    x = x ^ (x >> 13);
    x = x * 32'h5bd1e995;
    x = x ^ (x >> 15);
    return x;
  endfunction

  always_comb begin
    logic v;
    int   fl, p;
    int unsigned h;
    v = (lin < VBLANK) || (lin >= FIELD2_START && lin < FIELD2_START + VBLANK);
    if (col == 0 || col == ACTIVE_START - 4)           tx_data = 8'hFF;
    else if (col < 3 || (col > ACTIVE_START - 4 && col < ACTIVE_START - 1)) tx_data = 8'h00;
    else if (col == 3 || col == ACTIVE_START - 1) begin
      logic h;
      h = (col == 3);
      tx_data = {1'b1, field, v, h, field ^ v, field ^ h, v ^ h, field ^ v ^ h};
    end else if (col < ACTIVE_START || v)
      tx_data = col[0] ? 8'h10 : 8'h80;
    else begin
      fl = (fields_sent % 2 == 0) ? FLICKER : -FLICKER;
      p  = 30 + (col * 3 + lin * 2) % 150 + ((((col / 24) + (lin / 12)) % 2 == 1) ? 40 : 0) + fl;
      h  = hash(line_abs, col);
      if (h[1:0] == 2'b00 && NOISE > 0) p = p + int'((h >> 8) % (2 * NOISE + 1)) - NOISE;
      if (p < 16) p = 16;
      if (p > 235) p = 235;
      tx_data = 8'(p);
    end
  end

endmodule
