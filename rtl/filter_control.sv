// filter_control: switch-driven filter selection and status LEDs.
//
// The eight board switches are asynchronous to the pixel clock and pass a
// two-flop synchroniser. Bit 0 (DS0) is the lowest switch:
//   sw[0] grey output, sw[1] Sobel edge map, sw[2] Harris corner overlay,
//   sw[3] median filter, sw[4] sharpening filter; sw[7:5] are unused.
// Several filters may be active together. A new selection is taken on the
// first pixel of a frame (hStart & vStart & valid), so a frame is never
// processed with mixed settings; en then stays constant for the whole frame.
// led mirrors the active selection (led[4:0] = en, led[7:5] = 0).
// After reset all filters are off until the first frame start.
// Switch selection with several filters active at once, DS0 as the lowest
// bit and status LEDs follow the original system; the bit assignment, the
// synchroniser and the frame-boundary latch are choices made here.
module filter_control
  import pixel_stream_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sw,
  input  pix_ctrl_t  in_ctrl,
  output filt_en_t   en,
  output logic [7:0] led
);
  logic [7:0] sw_meta, sw_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_meta <= '0;
      sw_sync <= '0;
      en      <= '0;
    end else begin
      sw_meta <= sw;
      sw_sync <= sw_meta;
      if (in_ctrl.valid && in_ctrl.hStart && in_ctrl.vStart)
        en <= filt_en_t'(sw_sync[$bits(filt_en_t)-1:0]);
    end
  end

  assign led = {3'b000, en};
endmodule
