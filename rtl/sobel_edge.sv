// sobel_edge: Sobel edge map from the shared gradients.
//
// The gradient magnitude is approximated by |gx| + |gy| (11 bit, <= 2040) and
// compared with edge_thr: pixels above it become 255, the rest 0. With en low
// the block passes the window centre pixel instead, with the same latency, so
// switching the filter never changes the stream timing. Latency: 1 clock.
// A Sobel edge filter is part of the original system; the |gx|+|gy|
// magnitude, the binary output and the threshold port are choices made here.
module sobel_edge
  import pixel_stream_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [GRAD_W-1:0] gx,
  input  logic signed [GRAD_W-1:0] gy,
  input  logic [7:0]               center,
  input  pix_ctrl_t                in_ctrl,
  input  logic [MAG_W-1:0]         edge_thr,
  input  logic                     en,
  output logic [7:0]               out_pix,
  output pix_ctrl_t                out_ctrl
);
  logic [MAG_W-1:0] ax, ay, mag;
  always_comb begin
    ax  = gx[GRAD_W-1] ? MAG_W'(-gx) : MAG_W'(gx);
    ay  = gy[GRAD_W-1] ? MAG_W'(-gy) : MAG_W'(gy);
    mag = ax + ay;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_pix  <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      out_pix  <= en ? ((mag > edge_thr) ? 8'd255 : 8'd0) : center;
      out_ctrl <= in_ctrl;
    end
  end
endmodule
