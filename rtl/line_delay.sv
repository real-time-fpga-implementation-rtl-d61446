// line_delay: spatial delay of a pixel stream by LINES lines and PIXELS
// pixels, so that the word at stream position (r, c) is the input of position
// (r-LINES, c-PIXELS); positions above or left of the frame read as zero.
// It lets a path that has been through fewer 3x3 windows (each shifts the image
// by one line and one pixel) line up with one that has been through more.
// LINES chained line memories (LINE_LEN deep) give the line delay, a shift
// register that moves on valid pixels gives the pixel delay. Positions come
// from hStart/vStart. Latency: 1 clock, registered output. PIXELS >= 1.
// Needed only because of this implementation's image-shift convention.
module line_delay
  import pixel_stream_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned LINES    = 1,
  parameter int unsigned PIXELS   = 1,
  parameter int unsigned LINE_LEN = ACTIVE_PIXELS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_data,
  input  pix_ctrl_t    in_ctrl,
  output logic [W-1:0] out_data,
  output pix_ctrl_t    out_ctrl
);
  if (PIXELS < 1) begin : g_check
    $error("line_delay: PIXELS must be at least 1");
  end
  localparam int unsigned AW = (LINE_LEN > 1) ? $clog2(LINE_LEN) : 1;

  logic [15:0]   col_cnt, row_cnt, col_now, row_now;
  logic [AW-1:0] addr;
  logic [W-1:0]  ltap [LINES+1];        // ltap[k]: input delayed by k lines
  logic [W-1:0]  psr  [PIXELS];         // psr[k]: ltap[LINES] k+1 pixels ago

  assign ltap[0] = in_data;

  always_comb begin
    col_now = in_ctrl.hStart ? 16'd0 : col_cnt;
    if (in_ctrl.hStart && in_ctrl.vStart) row_now = 16'd0;
    else if (in_ctrl.hStart)              row_now = row_cnt + 16'd1;
    else                                  row_now = row_cnt;
    addr = col_now[AW-1:0];
  end

  for (genvar k = 0; k < LINES; k++) begin : g_line
    line_mem #(.W(W), .DEPTH(LINE_LEN), .AW(AW)) u_mem (
      .clk, .we(in_ctrl.valid), .addr, .wdata(ltap[k]), .rdata(ltap[k+1])
    );
  end

  always_ff @(posedge clk) begin
    if (in_ctrl.valid) begin
      psr[0] <= ltap[LINES];
      for (int k = 1; k < PIXELS; k++) psr[k] <= psr[k-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col_cnt  <= '0;
      row_cnt  <= '0;
      out_data <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      out_ctrl <= in_ctrl;
      if (in_ctrl.valid) begin
        col_cnt  <= col_now + 16'd1;
        row_cnt  <= row_now;
        out_data <= (row_now >= 16'(LINES) && col_now >= 16'(PIXELS)) ? psr[PIXELS-1] : '0;
      end
    end
  end
endmodule
