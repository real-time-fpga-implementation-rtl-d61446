// window_gen: K x K neighbourhood generator for a streaming pixel bus.
//
// K-1 line memories, each LINE_LEN words deep, hold the previous lines; they
// are chained so that on every valid pixel the column at the current x
// position shifts up by one line. The resulting K-tap column vector is shifted
// into a K x K register window. win[K-1][K-1] is the newest pixel, win[0][0]
// the oldest (top-left). So the window for the pixel at stream position (r, c)
// covers rows r-K+1..r and columns c-K+1..c, and its centre is the image
// pixel (r-K/2, c-K/2): every stage that uses this window shifts the image by
// K/2 lines and K/2 pixels. Taps that fall above the first line or left of the
// first pixel of the frame read as zero (constant padding); this masking also
// keeps stale memory contents from leaking into the output.
//
// Line and frame positions come from hStart/vStart of the control word; the
// window moves only on valid cycles. Latency: 1 clock (out_ctrl is in_ctrl
// delayed by one). Lines longer than LINE_LEN are not supported.
// This line-buffer structure and its border convention are choices of this
// implementation; the original system only names the filters built on it.
module window_gen
  import pixel_stream_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned K        = 3,
  parameter int unsigned LINE_LEN = ACTIVE_PIXELS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [W-1:0]     in_data,
  input  pix_ctrl_t        in_ctrl,
  output logic [W-1:0]     win [K][K],
  output pix_ctrl_t        out_ctrl
);
  localparam int unsigned AW = (LINE_LEN > 1) ? $clog2(LINE_LEN) : 1;

  logic [15:0] col_cnt, row_cnt;   // next column, current row
  logic [15:0] col_now, row_now;   // position of the pixel on in_data
  logic [15:0] pos_col, pos_row;   // position of win[K-1][K-1]
  logic [AW-1:0] addr;

  logic [W-1:0] ltap  [K-1];   // ltap[m]: pixel m+1 lines above
  logic [W-1:0] colv  [K];
  logic [W-1:0] wraw  [K][K];

  always_comb begin
    col_now = in_ctrl.hStart ? 16'd0 : col_cnt;
    if (in_ctrl.hStart && in_ctrl.vStart) row_now = 16'd0;
    else if (in_ctrl.hStart)              row_now = row_cnt + 16'd1;
    else                                  row_now = row_cnt;
    addr = col_now[AW-1:0];
    colv[K-1] = in_data;
    for (int m = 0; m < K - 1; m++) colv[K-2-m] = ltap[m];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col_cnt  <= '0;
      row_cnt  <= '0;
      pos_col  <= '0;
      pos_row  <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      out_ctrl <= in_ctrl;
      if (in_ctrl.valid) begin
        col_cnt <= col_now + 16'd1;
        row_cnt <= row_now;
        pos_col <= col_now;
        pos_row <= row_now;
      end
    end
  end

  // Line memories, chained: line m stores what line m-1 held at this column.
  for (genvar m = 0; m < K - 1; m++) begin : g_line
    line_mem #(.W(W), .DEPTH(LINE_LEN), .AW(AW)) u_mem (
      .clk, .we(in_ctrl.valid), .addr,
      .wdata(m == 0 ? in_data : ltap[m == 0 ? 0 : m-1]), .rdata(ltap[m])
    );
  end

  // Window registers: no reset, masked at the output.
  always_ff @(posedge clk) begin
    if (in_ctrl.valid) begin
      for (int i = 0; i < K; i++) begin
        for (int j = 0; j < K - 1; j++) wraw[i][j] <= wraw[i][j+1];
        wraw[i][K-1] <= colv[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        win[i][j] = (pos_row >= 16'(K - 1 - i) && pos_col >= 16'(K - 1 - j)) ? wraw[i][j] : '0;
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk)
    if (!rst && in_ctrl.valid)
      assert (col_now < 16'(LINE_LEN))
        else $error("window_gen: line longer than LINE_LEN=%0d", LINE_LEN);
`endif

endmodule
