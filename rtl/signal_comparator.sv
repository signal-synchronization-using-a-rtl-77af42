// signal_comparator: measures the latency of the optical data link against
// the electrical control link, in clocks, once per video field.
//
// The electrical link carries the field signal e_field (odd/even). The
// optical link carries the 8-bit video stream with ITU-R 656 timing reference
// codes FF 00 00 XY, whose bit XY[6] is the field bit F. When e_field changes,
// a counter starts. When the optical stream delivers the first timing code
// whose F differs from the previous one, the counter stops; since that code
// is recognised on its fourth byte, the delay amount is count - 3. The
// transmitter is taken to change e_field in the clock in which it sends the
// first byte of the first timing code of the new field, so the result is the
// pure optical-minus-electrical latency. Both the electrical field level and
// the optical field bit are taken as 0 at reset.
// Measuring at the field start follows the published method; the use of the
// embedded 656 codes and the exact convention above are this design's own.
//
// Interface: delay_amount is valid from the first completed measurement
// (delay_valid=1) and is updated every field. If the optical field change is
// not seen within MAX_DELAY+3 clocks, delay_over is set and delay_amount is
// held at MAX_DELAY. The delay must be non-negative (optical later than
// electrical).
module signal_comparator
  import vsync_pkg::*;
#(
  parameter int MAX_DELAY = 1700,
  localparam int DW       = $clog2(MAX_DELAY + 4)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pix_t          opt_data,
  input  logic          e_field,
  output logic [DW-1:0] delay_amount,
  output logic          delay_valid,
  output logic          delay_over,
  output logic          opt_field      // field bit recovered from the optical stream
);

  localparam int TRS_LAT = 3;  // clocks from the FF byte to the XY byte

  pix_t          hist [3];     // the three previous optical bytes
  logic          e_field_q;
  logic          counting;
  logic [DW-1:0] cnt;

  logic e_edge, trs_xy, f_change;

  assign e_edge   = (e_field != e_field_q);
  assign trs_xy   = (hist[2] == 8'hFF) && (hist[1] == 8'h00) && (hist[0] == 8'h00) && opt_data[7];
  assign f_change = trs_xy && (opt_data[6] != opt_field);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist         <= '{default: '0};
      e_field_q    <= 1'b0;
      opt_field    <= 1'b0;
      counting     <= 1'b0;
      cnt          <= '0;
      delay_amount <= '0;
      delay_valid  <= 1'b0;
      delay_over   <= 1'b0;
    end else begin
      hist[2]   <= hist[1];
      hist[1]   <= hist[0];
      hist[0]   <= opt_data;
      e_field_q <= e_field;
      if (trs_xy) opt_field <= opt_data[6];
      if (counting && f_change) begin
        counting     <= 1'b0;
        delay_valid  <= 1'b1;
        delay_over   <= 1'b0;
        delay_amount <= (cnt >= DW'(TRS_LAT)) ? cnt - DW'(TRS_LAT) : '0;
      end else if (counting && cnt == DW'(MAX_DELAY + TRS_LAT)) begin
        counting     <= 1'b0;
        delay_over   <= 1'b1;
        delay_amount <= DW'(MAX_DELAY);
      end else if (counting) begin
        cnt <= cnt + 1'b1;
      end
      // A field edge on the electrical link (re)starts a measurement.
      if (e_edge) begin
        counting <= 1'b1;
        cnt      <= DW'(1);
      end
    end
  end

endmodule
