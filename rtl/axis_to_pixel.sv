// axis_to_pixel: AXI4-Stream video to streaming-pixel bridge (input side of
// the filter IP).
//
// AXI4-Stream video marks the first pixel of a frame with TUSER and the last
// pixel of each line with TLAST. This block turns every accepted beat into a
// pixel with a control word: hStart on the first beat after a TLAST (or on a
// TUSER beat), vStart on TUSER, hEnd on TLAST, and vEnd on the TLAST beat of
// line FRAME_LINES-1, counted from TUSER. Cycles without a beat become idle
// (valid = 0) pixels. The pipeline behind it cannot stall, so s_tready is
// always 1: the video source sets the pace. Latency: 1 clock.
// The AXI4-Stream compatibility of the pixel interface follows the original
// system; the flag mapping and the always-ready policy are choices made here.
module axis_to_pixel
  import pixel_stream_pkg::*;
#(
  parameter int unsigned FRAME_LINES = ACTIVE_LINES
) (
  input  logic      clk,
  input  logic      rst,
  input  rgb_t      s_tdata,
  input  logic      s_tvalid,
  output logic      s_tready,
  input  logic      s_tuser,
  input  logic      s_tlast,
  output rgb_t      out_rgb,
  output pix_ctrl_t out_ctrl
);
  logic        sol;        // next beat starts a line
  logic [15:0] row_cnt, row_now;
  logic        hs;

  assign s_tready = 1'b1;

  always_comb begin
    hs = sol | s_tuser;
    if (s_tuser)  row_now = 16'd0;
    else if (hs)  row_now = row_cnt + 16'd1;
    else          row_now = row_cnt;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sol      <= 1'b1;
      row_cnt  <= '0;
      out_rgb  <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      out_ctrl <= CTRL_IDLE;
      if (s_tvalid) begin
        sol             <= s_tlast;
        row_cnt         <= row_now;
        out_rgb         <= s_tdata;
        out_ctrl.valid  <= 1'b1;
        out_ctrl.hStart <= hs;
        out_ctrl.vStart <= s_tuser;
        out_ctrl.hEnd   <= s_tlast;
        out_ctrl.vEnd   <= s_tlast && (row_now == 16'(FRAME_LINES - 1));
      end
    end
  end
endmodule
