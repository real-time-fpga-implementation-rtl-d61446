// pixel_to_axis: streaming-pixel to AXI4-Stream video bridge (output side of
// the filter IP).
//
// Each valid pixel becomes one beat: TUSER on the first pixel of a frame
// (hStart & vStart), TLAST on the last pixel of a line (hEnd). The corner
// flag travels as a side-band bit with the beat. The pipeline in front
// cannot be stalled, so the sink must accept a beat every cycle it is
// offered; a beat offered while m_tready is low is lost and sets the sticky
// overrun flag (cleared by reset). Latency: 1 clock.
// The AXI4-Stream compatibility follows the original system; the overrun
// policy is a choice made here.
module pixel_to_axis
  import pixel_stream_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  rgb_t      in_rgb,
  input  logic      in_corner,
  input  pix_ctrl_t in_ctrl,
  output rgb_t      m_tdata,
  output logic      m_tvalid,
  input  logic      m_tready,
  output logic      m_tuser,
  output logic      m_tlast,
  output logic      m_corner,
  output logic      overrun
);
  always_ff @(posedge clk) begin
    if (rst) begin
      m_tdata  <= '0;
      m_tvalid <= 1'b0;
      m_tuser  <= 1'b0;
      m_tlast  <= 1'b0;
      m_corner <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      m_tvalid <= in_ctrl.valid;
      m_tdata  <= in_rgb;
      m_tuser  <= in_ctrl.valid & in_ctrl.hStart & in_ctrl.vStart;
      m_tlast  <= in_ctrl.valid & in_ctrl.hEnd;
      m_corner <= in_corner;
      if (m_tvalid && !m_tready) overrun <= 1'b1;
    end
  end
endmodule
