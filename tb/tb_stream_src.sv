// tb_stream_src: streaming pixel source for testbenches. Emits frames of
// IMG_W x IMG_H pixels as pixel-control words, with HBLANK idle cycles after
// every line, VBLANK idle cycles after every frame and, inside a line, idle
// cycles with probability GAP_PCT percent. row/col/frame give the position of
// the pixel carried on the current valid cycle; the testbench looks up the
// pixel data from them. Stops after NFRAMES frames (done goes high).
module tb_stream_src
  import pixel_stream_pkg::*;
#(
  parameter int IMG_W   = 8,
  parameter int IMG_H   = 6,
  parameter int HBLANK  = 4,
  parameter int VBLANK  = 8,
  parameter int GAP_PCT = 10,
  parameter int NFRAMES = 1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      run,
  output pix_ctrl_t ctrl,
  output int        row,
  output int        col,
  output int        frame,
  output logic      done
);
  int r, c, f, blank;

  always_ff @(posedge clk) begin
    if (rst) begin
      r <= 0; c <= 0; f <= 0; blank <= 0;
      ctrl <= CTRL_IDLE; row <= 0; col <= 0; frame <= 0; done <= 1'b0;
    end else begin
      ctrl <= CTRL_IDLE;
      if (!run || done) begin
        // idle
      end else if (blank > 0) begin
        blank <= blank - 1;
      end else if (GAP_PCT > 0 && c != 0 && int'($urandom_range(99)) < GAP_PCT) begin
        // idle cycle inside a line
      end else begin
        ctrl.valid  <= 1'b1;
        ctrl.hStart <= (c == 0);
        ctrl.hEnd   <= (c == IMG_W - 1);
        ctrl.vStart <= (r == 0 && c == 0);
        ctrl.vEnd   <= (r == IMG_H - 1 && c == IMG_W - 1);
        row <= r; col <= c; frame <= f;
        if (c == IMG_W - 1) begin
          c <= 0;
          blank <= HBLANK;
          if (r == IMG_H - 1) begin
            r <= 0;
            blank <= VBLANK;
            f <= f + 1;
            if (f + 1 == NFRAMES) done <= 1'b1;
          end else begin
            r <= r + 1;
          end
        end else begin
          c <= c + 1;
        end
      end
    end
  end
endmodule
