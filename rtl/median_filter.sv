// median_filter: 3x3 median filter (noise removal) for the intensity stream.
//
// The nine window pixels are ranked: each pixel's rank is the number of
// pixels smaller than it, ties broken by window position, so the ranks are a
// permutation of 0..8 and the pixel of rank 4 is the median. With en low the
// window centre passes through with the same latency. Taps outside the frame
// are zero. Output at stream position (r, c) belongs to input position
// (r-1, c-1). Latency: 2 clocks (window 1, ranking 1).
// The original system has a median filter for noise removal; the 3x3 size,
// the rank-based circuit and the bypass are choices made here.
module median_filter
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

  logic [7:0] v [9];
  logic [7:0] med;
  always_comb begin
    logic [3:0] rank;
    for (int i = 0; i < 9; i++) v[i] = w[i / 3][i % 3];
    med = '0;
    for (int i = 0; i < 9; i++) begin
      rank = '0;
      for (int j = 0; j < 9; j++)
        if (v[j] < v[i] || (v[j] == v[i] && j < i)) rank = rank + 4'd1;
      if (rank == 4'd4) med = v[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_pix  <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      out_pix  <= en ? med : w[1][1];
      out_ctrl <= wctrl;
    end
  end
endmodule
