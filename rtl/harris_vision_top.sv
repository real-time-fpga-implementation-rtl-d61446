// harris_vision_top: real-time grey / edge / corner / median / sharpen video
// pipeline at one pixel per clock.
//
// Data path (all on the pixel clock, no back-pressure):
//   in_rgb -> ip_gray_edge -> grey or Sobel edge map -> ip_median_sharpen
//                          -> Harris corner flag ------------------------+
//   in_rgb -> colour line delay --------------------------------------+  |
//   output mux: grey path if any of grey/edge/median/sharpen is on,
//   else the original colour; corners painted red when the corner overlay
//   is on.
// Every 3x3 stage shifts the image by one line and one pixel. The intensity
// path goes through three 3x3 stages, the corner path through two, so the
// corner flag gets one extra line+pixel delay and the colour path three,
// plus cycle delays, so that all three meet at the same image pixel:
// out_rgb at stream position (r, c) shows image pixel (r-3, c-3), with
// zero-padded borders. Latency from in_ctrl to out_ctrl: LAT_TOP = 13 clocks.
//
// filter_control turns the switches into filter enables at each frame start;
// each stage sees that selection delayed by its own latency, so the change
// takes effect exactly on the frame boundary everywhere in the pipeline.
// edge_thr and harris_thr are run-time parameters set by software.
// The chain of filters, the switch control and the 1280-pixel line follow
// the original system; the output composition, the corner overlay and the
// path alignment are choices of this implementation.
module harris_vision_top
  import pixel_stream_pkg::*;
#(
  parameter int unsigned LINE_LEN = ACTIVE_PIXELS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  rgb_t                     in_rgb,
  input  pix_ctrl_t                in_ctrl,
  input  logic [7:0]               sw,
  input  logic [MAG_W-1:0]         edge_thr,
  input  logic signed [RESP_W-1:0] harris_thr,
  output rgb_t                     out_rgb,
  output pix_ctrl_t                out_ctrl,
  output logic                     out_corner,
  output logic [7:0]               led
);
  filt_en_t en, en_edge, en_med, en_sharp, en_out;

  filter_control u_ctrl (.clk, .rst, .sw, .in_ctrl, .en, .led);

  // en is valid one clock after the frame's first pixel; a stage that
  // registers pixels of latency L uses en delayed by L-1.
  pipe_delay #(.W($bits(filt_en_t)), .N(LAT_GRAY + LAT_SOBEL - 1)) u_den_edge
    (.clk, .rst, .d(en), .q(en_edge));
  pipe_delay #(.W($bits(filt_en_t)), .N(LAT_IP1_Y + LAT_MEDIAN - 1)) u_den_med
    (.clk, .rst, .d(en), .q(en_med));
  pipe_delay #(.W($bits(filt_en_t)), .N(LAT_IP1_Y + LAT_IP2 - 1)) u_den_sharp
    (.clk, .rst, .d(en), .q(en_sharp));
  pipe_delay #(.W($bits(filt_en_t)), .N(LAT_TOP - 1)) u_den_out
    (.clk, .rst, .d(en), .q(en_out));

  // Intensity path and corner detection.
  logic [7:0]               y1, y2, y3;
  pix_ctrl_t                y1_ctrl, y2_ctrl, y3_ctrl, c_ctrl, ca_ctrl;
  logic                     corner, corner_a;
  logic signed [RESP_W-1:0] resp;

  ip_gray_edge #(.LINE_LEN(LINE_LEN)) u_ip1 (
    .clk, .rst, .in_rgb, .in_ctrl, .edge_en(en_edge.sobel), .edge_thr, .harris_thr,
    .y_out(y1), .y_ctrl(y1_ctrl), .corner, .resp, .c_ctrl
  );

  ip_median_sharpen #(.LINE_LEN(LINE_LEN)) u_ip2 (
    .clk, .rst, .in_pix(y1), .in_ctrl(y1_ctrl), .med_en(en_med.median),
    .sharp_en(en_sharp.sharpen), .out_pix(y2), .out_ctrl(y2_ctrl)
  );

  localparam int unsigned Y_PAD = LAT_ALIGN - LAT_IP1_Y - LAT_IP2;
  pipe_delay #(.W(8), .N(Y_PAD)) u_ypad (.clk, .rst, .d(y2), .q(y3));
  pipe_delay #(.W($bits(pix_ctrl_t)), .N(Y_PAD)) u_cpad (.clk, .rst, .d(y2_ctrl), .q(y3_ctrl));

  // Corner flag: one more line + pixel to match the third 3x3 stage.
  line_delay #(.W(1), .LINES(1), .PIXELS(1), .LINE_LEN(LINE_LEN)) u_cdel (
    .clk, .rst, .in_data(corner), .in_ctrl(c_ctrl), .out_data(corner_a), .out_ctrl(ca_ctrl)
  );

  // Colour path: three lines + three pixels, then cycle alignment.
  rgb_t      rgb_d, rgb_a;
  pix_ctrl_t rgb_ctrl;
  line_delay #(.W($bits(rgb_t)), .LINES(3), .PIXELS(3), .LINE_LEN(LINE_LEN)) u_rgbdel (
    .clk, .rst, .in_data(in_rgb), .in_ctrl, .out_data(rgb_d), .out_ctrl(rgb_ctrl)
  );
  pipe_delay #(.W($bits(rgb_t)), .N(LAT_ALIGN - LAT_LDELAY)) u_rgbpad (
    .clk, .rst, .d(rgb_d), .q(rgb_a)
  );

  // Output composition.
  logic grey_sel;
  assign grey_sel = en_out.gray | en_out.sobel | en_out.median | en_out.sharpen;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_rgb    <= '0;
      out_ctrl   <= CTRL_IDLE;
      out_corner <= 1'b0;
    end else begin
      out_ctrl   <= y3_ctrl;
      out_corner <= corner_a;
      if (en_out.corner && corner_a) out_rgb <= '{r: 8'd255, g: 8'd0, b: 8'd0};
      else if (grey_sel)             out_rgb <= '{r: y3, g: y3, b: y3};
      else                           out_rgb <= rgb_a;
    end
  end

`ifndef SYNTHESIS
  // The three aligned paths must carry identical control words.
  always_ff @(posedge clk)
    if (!rst) assert (ca_ctrl == y3_ctrl)
      else $error("harris_vision_top: corner path out of step with intensity path");
`endif
endmodule
