// harris_vision_axis: the corner/filter pipeline as an IP with AXI4-Stream
// video ports, as it sits between the camera input chain and the frame
// buffer.
//
// s_axis (RGB, TUSER = start of frame, TLAST = end of line) -> axis_to_pixel
// -> harris_vision_top -> pixel_to_axis -> m_axis. The edge and Harris
// thresholds come from filter_regs, an AXI4-Lite register block on the
// processor bus, which also reports the active filters and the overrun flag.
// The switch and LED signals of harris_vision_top are brought out unchanged;
// m_axis_corner is the aligned corner flag as a side-band bit of each beat.
// The source must not send lines longer than LINE_LEN; the sink must accept
// every beat (m_axis_tready low while a beat is offered sets overrun).
// Latency from an input beat to its output beat: LAT_TOP + 2 = 15 clocks.
// Packaging the filters as a streaming IP follows the original system; the
// side-band corner bit, the overrun flag and the register map are choices
// made here.
module harris_vision_axis
  import pixel_stream_pkg::*;
#(
  parameter int unsigned LINE_LEN    = ACTIVE_PIXELS,
  parameter int unsigned FRAME_LINES = ACTIVE_LINES
) (
  input  logic                     clk,
  input  logic                     rst,
  input  rgb_t                     s_axis_tdata,
  input  logic                     s_axis_tvalid,
  output logic                     s_axis_tready,
  input  logic                     s_axis_tuser,
  input  logic                     s_axis_tlast,
  output rgb_t                     m_axis_tdata,
  output logic                     m_axis_tvalid,
  input  logic                     m_axis_tready,
  output logic                     m_axis_tuser,
  output logic                     m_axis_tlast,
  output logic                     m_axis_corner,
  input  logic [3:0]               s_axil_awaddr,
  input  logic                     s_axil_awvalid,
  output logic                     s_axil_awready,
  input  logic [31:0]              s_axil_wdata,
  input  logic [3:0]               s_axil_wstrb,
  input  logic                     s_axil_wvalid,
  output logic                     s_axil_wready,
  output logic [1:0]               s_axil_bresp,
  output logic                     s_axil_bvalid,
  input  logic                     s_axil_bready,
  input  logic [3:0]               s_axil_araddr,
  input  logic                     s_axil_arvalid,
  output logic                     s_axil_arready,
  output logic [31:0]              s_axil_rdata,
  output logic [1:0]               s_axil_rresp,
  output logic                     s_axil_rvalid,
  input  logic                     s_axil_rready,
  input  logic [7:0]               sw,
  output logic [7:0]               led,
  output logic                     overrun
);
  rgb_t      p_rgb, q_rgb;
  pix_ctrl_t p_ctrl, q_ctrl;
  logic      q_corner;
  logic [MAG_W-1:0]         edge_thr;
  logic signed [RESP_W-1:0] harris_thr;

  filter_regs u_regs (
    .clk, .rst,
    .awaddr(s_axil_awaddr), .awvalid(s_axil_awvalid), .awready(s_axil_awready),
    .wdata(s_axil_wdata), .wstrb(s_axil_wstrb), .wvalid(s_axil_wvalid), .wready(s_axil_wready),
    .bresp(s_axil_bresp), .bvalid(s_axil_bvalid), .bready(s_axil_bready),
    .araddr(s_axil_araddr), .arvalid(s_axil_arvalid), .arready(s_axil_arready),
    .rdata(s_axil_rdata), .rresp(s_axil_rresp), .rvalid(s_axil_rvalid), .rready(s_axil_rready),
    .edge_thr, .harris_thr, .led, .overrun
  );

  axis_to_pixel #(.FRAME_LINES(FRAME_LINES)) u_in (
    .clk, .rst, .s_tdata(s_axis_tdata), .s_tvalid(s_axis_tvalid), .s_tready(s_axis_tready),
    .s_tuser(s_axis_tuser), .s_tlast(s_axis_tlast), .out_rgb(p_rgb), .out_ctrl(p_ctrl)
  );

  harris_vision_top #(.LINE_LEN(LINE_LEN)) u_core (
    .clk, .rst, .in_rgb(p_rgb), .in_ctrl(p_ctrl), .sw, .edge_thr, .harris_thr,
    .out_rgb(q_rgb), .out_ctrl(q_ctrl), .out_corner(q_corner), .led
  );

  pixel_to_axis u_out (
    .clk, .rst, .in_rgb(q_rgb), .in_corner(q_corner), .in_ctrl(q_ctrl),
    .m_tdata(m_axis_tdata), .m_tvalid(m_axis_tvalid), .m_tready(m_axis_tready),
    .m_tuser(m_axis_tuser), .m_tlast(m_axis_tlast), .m_corner(m_axis_corner), .overrun
  );
endmodule
