// sync_rx_top: receiver-side synchronization block of a video link whose data
// travels over an optical channel while clock and control (line and field
// timing) travel over an electrical one.
//
// The optical path adds latency (E/O and O/E conversion, buffering,
// processing) that the electrical path does not. The signal comparator
// measures that latency at each field start by comparing the field bit
// embedded in the optical stream with the electrical field signal; the delay
// control and process block uses the measured amount to place the optical
// data in its 4-line buffer, removes background noise (DCT coefficient
// threshold) and flicker (Haar threshold across consecutive blocks), and
// reads the stream out aligned to the electrical timing, 4 lines later.
//
// Interface: clk is the common pixel-byte clock carried by the electrical
// link; opt_data is the byte stream from the optical receiver; e_hs (line
// start pulse) and e_field (field level) come from the electrical link.
// vid_out, out_hs and out_field go to the video encoder; vid_out line n
// appears together with the electrical line n+4 timing, one clock behind
// e_hs. delay_amount/delay_valid/delay_over report the measured latency,
// opt_field the field bit recovered from the optical stream, and
// blk_start/blk_done pulse as a 4x4 block enters / leaves the pipeline.
module sync_rx_top
  import vsync_pkg::*;
#(
  parameter int LINE_BYTES   = 1716,
  parameter int ACTIVE_START = 276,
  parameter int MAX_DELAY    = LINE_BYTES - 16,
  localparam int DW          = $clog2(MAX_DELAY + 4)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pix_t          opt_data,
  input  logic          e_hs,
  input  logic          e_field,
  input  nr_cfg_t       cfg,
  output pix_t          vid_out,
  output logic          out_hs,
  output logic          out_field,
  output logic [DW-1:0] delay_amount,
  output logic          delay_valid,
  output logic          delay_over,
  output logic          blk_start,
  output logic          blk_done,
  output logic          opt_field
);

  signal_comparator #(.MAX_DELAY(MAX_DELAY)) u_cmp (
    .clk, .rst_n, .opt_data, .e_field,
    .delay_amount, .delay_valid, .delay_over, .opt_field
  );

  delay_process #(
    .LINE_BYTES(LINE_BYTES), .ACTIVE_START(ACTIVE_START), .MAX_DELAY(MAX_DELAY)
  ) u_dp (
    .clk, .rst_n, .data_in(opt_data), .e_hs, .delay_amount, .cfg,
    .data_out(vid_out), .out_hs, .blk_start, .blk_done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_field <= 1'b0;
    else        out_field <= e_field;
  end

endmodule
