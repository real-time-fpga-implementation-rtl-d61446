// sharpen_filter: 3x3 Laplacian sharpening for the intensity stream.
//
// out = 5 c - (n + s + e + w), where c is the window centre and n, s, e, w
// its four neighbours, saturated to 0..255. With en low the centre passes
// through with the same latency. Taps outside the frame are zero. Output at
// stream position (r, c) belongs to input position (r-1, c-1).
// Latency: 2 clocks (window 1, kernel and clamp 1).
// The original system has a sharpening filter; the Laplacian kernel,
// the saturation and the bypass are choices made here.
module sharpen_filter
  import pixel_stream_pkg::*;
#(
  parameter int unsigned LINE_LEN = ACTIVE_PIXELS
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] in_pix,
  input  pix_ctrl_t  in_ctrl,
  input  logic       en,
  output logic [7:0] out_pix,
  output pix_ctrl_t  out_ctrl
);
  logic [7:0] w [3][3];
  pix_ctrl_t  wctrl;

  window_gen #(.W(8), .K(3), .LINE_LEN(LINE_LEN)) u_win (
    .clk, .rst, .in_data(in_pix), .in_ctrl, .win(w), .out_ctrl(wctrl)
  );

  logic signed [11:0] acc;
  logic [7:0]         sat;
  always_comb begin
    acc = 12'sd5 * signed'({4'd0, w[1][1]})
        - signed'({4'd0, w[0][1]}) - signed'({4'd0, w[2][1]})
        - signed'({4'd0, w[1][0]}) - signed'({4'd0, w[1][2]});
    if (acc < 0)              sat = 8'd0;
    else if (acc > 12'sd255)  sat = 8'd255;
    else                      sat = acc[7:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_pix  <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      out_pix  <= en ? sat : w[1][1];
      out_ctrl <= wctrl;
    end
  end
endmodule
