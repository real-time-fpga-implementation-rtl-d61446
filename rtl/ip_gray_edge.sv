// ip_gray_edge: first filter IP block - grey conversion, Sobel edge map and
// Harris corner detection.
//
// RGB pixels are converted to grey, one shared Sobel stage computes Ix and Iy,
// and these feed both the edge filter (intensity output, or the grey pixel
// when edge_en is low) and the Harris corner detector (corner flag and
// response). Two outputs with their own control words and latencies:
//   y_out / y_ctrl            latency 5 clocks, image shifted 1 line + 1 pixel
//   corner, resp / c_ctrl     latency 11 clocks, shifted 2 lines + 2 pixels
// (see pixel_stream_pkg for the latency constants). edge_en is sampled when
// the edge stage registers its output, i.e. 4 clocks after the pixel entered.
// Grouping grey conversion and edge detection in one block follows the
// original system; adding the Harris detector to it, on shared gradients,
// is a choice made here.
module ip_gray_edge
  import pixel_stream_pkg::*;
#(
  parameter int unsigned LINE_LEN = ACTIVE_PIXELS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  rgb_t                     in_rgb,
  input  pix_ctrl_t                in_ctrl,
  input  logic                     edge_en,
  input  logic [MAG_W-1:0]         edge_thr,
  input  logic signed [RESP_W-1:0] harris_thr,
  output logic [7:0]               y_out,
  output pix_ctrl_t                y_ctrl,
  output logic                     corner,
  output logic signed [RESP_W-1:0] resp,
  output pix_ctrl_t                c_ctrl
);
  logic [7:0]               gray;
  pix_ctrl_t                gray_ctrl, g_ctrl;
  logic signed [GRAD_W-1:0] gx, gy;
  logic [7:0]               center;

  gray_converter u_gray (
    .clk, .rst, .in_rgb, .in_ctrl, .out_y(gray), .out_ctrl(gray_ctrl)
  );

  sobel_gradient #(.LINE_LEN(LINE_LEN)) u_grad (
    .clk, .rst, .in_pix(gray), .in_ctrl(gray_ctrl),
    .gx, .gy, .center, .out_ctrl(g_ctrl)
  );

  sobel_edge u_edge (
    .clk, .rst, .gx, .gy, .center, .in_ctrl(g_ctrl), .edge_thr, .en(edge_en),
    .out_pix(y_out), .out_ctrl(y_ctrl)
  );

  harris_corner #(.LINE_LEN(LINE_LEN)) u_harris (
    .clk, .rst, .gx, .gy, .in_ctrl(g_ctrl), .thr(harris_thr),
    .corner, .resp, .out_ctrl(c_ctrl)
  );
endmodule
