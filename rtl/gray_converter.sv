// gray_converter: RGB to grey (luma) conversion for the pixel stream.
//
// Y = 0.299 R + 0.587 G + 0.114 B, the ITU-R BT.601 luma weights, in 8-bit
// fixed point: Y = (77 R + 150 G + 29 B + 128) >> 8. The weights sum to 256,
// so white maps to 255 and the result never overflows 8 bits. The output is
// full range (0..255), not the 16..235 studio range. Stage 1 registers the
// three products, stage 2 the rounded sum: latency 2 clocks, one pixel per
// clock, control word delayed alongside.
// The BT.601 luma weighting follows the original system; the 8-bit
// fixed-point form, the rounding and the two-stage pipeline are choices of
// this implementation.
module gray_converter
  import pixel_stream_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  rgb_t      in_rgb,
  input  pix_ctrl_t in_ctrl,
  output logic [7:0] out_y,
  output pix_ctrl_t out_ctrl
);
  localparam logic [7:0] CR = 8'd77;
  localparam logic [7:0] CG = 8'd150;
  localparam logic [7:0] CB = 8'd29;

  logic [15:0] pr, pg, pb;
  logic [16:0] sum;
  pix_ctrl_t   ctrl1;

  assign sum = 17'(pr) + 17'(pg) + 17'(pb) + 17'd128;

  always_ff @(posedge clk) begin
    if (rst) begin
      pr <= '0; pg <= '0; pb <= '0;
      out_y    <= '0;
      ctrl1    <= CTRL_IDLE;
      out_ctrl <= CTRL_IDLE;
    end else begin
      pr       <= in_rgb.r * CR;
      pg       <= in_rgb.g * CG;
      pb       <= in_rgb.b * CB;
      ctrl1    <= in_ctrl;
      out_y    <= sum[15:8];
      out_ctrl <= ctrl1;
    end
  end
endmodule
