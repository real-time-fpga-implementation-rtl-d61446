// tb_stream_pos: recovers the frame, row and column of the pixel on a
// pixel-control bus from hStart/vStart, for output checking. The outputs are
// combinational and refer to the current cycle; frame starts at 0 with the
// first frame seen. It also checks that hEnd/vEnd arrive where the frame size
// says: ctrl_err pulses on a misplaced flag.
module tb_stream_pos
  import pixel_stream_pkg::*;
#(
  parameter int IMG_W = 8,
  parameter int IMG_H = 6
) (
  input  logic      clk,
  input  logic      rst,
  input  pix_ctrl_t ctrl,
  output int        row,
  output int        col,
  output int        frame,
  output logic      ctrl_err
);
  int nxt_col, cur_row, cur_frame;

  always_comb begin
    col   = ctrl.hStart ? 0 : nxt_col;
    row   = (ctrl.hStart && ctrl.vStart) ? 0 : (ctrl.hStart ? cur_row + 1 : cur_row);
    frame = (ctrl.hStart && ctrl.vStart) ? cur_frame + 1 : cur_frame;
    ctrl_err = ctrl.valid && ((ctrl.hEnd != (col == IMG_W - 1)) ||
                              (ctrl.vEnd != (row == IMG_H - 1 && col == IMG_W - 1)) ||
                              (ctrl.vStart != (row == 0 && col == 0)) ||
                              (ctrl.hStart != (col == 0)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      nxt_col <= 0; cur_row <= 0; cur_frame <= -1;
    end else if (ctrl.valid) begin
      nxt_col <= col + 1; cur_row <= row; cur_frame <= frame;
    end
  end
endmodule
