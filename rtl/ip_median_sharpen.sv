// ip_median_sharpen: second filter IP block - 3x3 median filter followed by
// 3x3 sharpening, each with its own enable. A disabled filter passes its
// window centre, so the block always has the same latency (4 clocks) and
// always shifts the image by 2 lines and 2 pixels. med_en is sampled 2 clocks
// and sharp_en 4 clocks after a pixel enters the block.
// The pairing of median and sharpening in one block follows the original
// system; their order and the bypass scheme are choices made here.
module ip_median_sharpen
  import pixel_stream_pkg::*;
#(
  parameter int unsigned LINE_LEN = ACTIVE_PIXELS
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] in_pix,
  input  pix_ctrl_t  in_ctrl,
  input  logic       med_en,
  input  logic       sharp_en,
  output logic [7:0] out_pix,
  output pix_ctrl_t  out_ctrl
);
  logic [7:0] m_pix;
  pix_ctrl_t  m_ctrl;

  median_filter #(.LINE_LEN(LINE_LEN)) u_median (
    .clk, .rst, .in_pix, .in_ctrl, .en(med_en), .out_pix(m_pix), .out_ctrl(m_ctrl)
  );

  sharpen_filter #(.LINE_LEN(LINE_LEN)) u_sharpen (
    .clk, .rst, .in_pix(m_pix), .in_ctrl(m_ctrl), .en(sharp_en), .out_pix, .out_ctrl
  );
endmodule
