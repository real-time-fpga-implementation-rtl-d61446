// sobel_gradient: local intensity derivatives Ix and Iy of the pixel stream.
//
// A 3x3 window (window_gen) feeds the Sobel kernels
//   gx = (p02 + 2 p12 + p22) - (p00 + 2 p10 + p20)     (right minus left)
//   gy = (p20 + 2 p21 + p22) - (p00 + 2 p01 + p02)     (bottom minus top)
// where pij is window row i, column j. Results are signed 11 bit
// (|g| <= 1020). The window centre is passed out as well, so a following
// filter can bypass to the unfiltered pixel with the same timing.
// The gradients serve both the Sobel edge filter and the Harris detector.
// Output at stream position (r, c) belongs to image pixel (r-1, c-1); taps
// outside the frame are zero. Latency: 2 clocks (window 1, kernel 1).
// The original system only calls for local derivatives Ix and Iy; the Sobel
// kernels and the shared use with the edge filter are choices made here.
module sobel_gradient
  import pixel_stream_pkg::*;
#(
  parameter int unsigned LINE_LEN = ACTIVE_PIXELS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [7:0]              in_pix,
  input  pix_ctrl_t               in_ctrl,
  output logic signed [GRAD_W-1:0] gx,
  output logic signed [GRAD_W-1:0] gy,
  output logic [7:0]              center,
  output pix_ctrl_t               out_ctrl
);
  logic [7:0] w [3][3];
  pix_ctrl_t  wctrl;

  window_gen #(.W(8), .K(3), .LINE_LEN(LINE_LEN)) u_win (
    .clk, .rst, .in_data(in_pix), .in_ctrl, .win(w), .out_ctrl(wctrl)
  );

  function automatic logic signed [GRAD_W-1:0] ext(input logic [7:0] p);
    return GRAD_W'(signed'({1'b0, p}));
  endfunction

  logic signed [GRAD_W-1:0] gx_c, gy_c;
  always_comb begin
    gx_c = (ext(w[0][2]) + 2 * ext(w[1][2]) + ext(w[2][2]))
         - (ext(w[0][0]) + 2 * ext(w[1][0]) + ext(w[2][0]));
    gy_c = (ext(w[2][0]) + 2 * ext(w[2][1]) + ext(w[2][2]))
         - (ext(w[0][0]) + 2 * ext(w[0][1]) + ext(w[0][2]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gx <= '0; gy <= '0; center <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      gx       <= gx_c;
      gy       <= gy_c;
      center   <= w[1][1];
      out_ctrl <= wctrl;
    end
  end
endmodule
