// tb_axis_to_pixel: random AXI4-Stream video frames (random TVALID gaps,
// 7-pixel lines, 5-line frames) into the bridge. Each output pixel is
// compared one clock later with the control word expected from the beat's
// position in the frame; idle cycles must give valid = 0, and s_tready must
// stay high.
module tb_axis_to_pixel;
  import pixel_stream_pkg::*;
  localparam int W = 7, H = 5, NBEATS = 600;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  rgb_t s_tdata, out_rgb;
  logic s_tvalid, s_tready, s_tuser, s_tlast;
  pix_ctrl_t out_ctrl, exp_ctrl;
  rgb_t exp_rgb;
  int checks = 0, failures = 0, cyc = 0, beats = 0, nvend = 0;
  bit have = 0;

  axis_to_pixel #(.FRAME_LINES(H)) dut (.clk, .rst, .s_tdata, .s_tvalid, .s_tready, .s_tuser, .s_tlast,
                                        .out_rgb, .out_ctrl);

  initial begin
    int r, c;
    r = 0; c = 0;
    s_tdata = '0; s_tvalid = 0; s_tuser = 0; s_tlast = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    while (beats < NBEATS) begin
      @(posedge clk);
      if ($urandom_range(3) == 0) begin
        s_tvalid <= 0; s_tuser <= 0; s_tlast <= 0; s_tdata <= rgb_t'($urandom);
      end else begin
        s_tvalid <= 1;
        s_tdata  <= rgb_t'($urandom);
        s_tuser  <= (r == 0 && c == 0);
        s_tlast  <= (c == W - 1);
        beats++;
        if (c == W - 1) begin c = 0; r = (r == H - 1) ? 0 : r + 1; end
        else c++;
      end
    end
    @(posedge clk);
    s_tvalid <= 0; s_tuser <= 0; s_tlast <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nvend != NBEATS / (W * H)) begin failures++; $display("vEnd seen %0d times", nvend); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent position model of the input beats.
  int mr = 0, mc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (have) begin
        checks++;
        if (out_ctrl != exp_ctrl || (exp_ctrl.valid && out_rgb != exp_rgb)) begin
          failures++;
          $display("cycle %0d: got %b %h exp %b %h", cyc, out_ctrl, out_rgb, exp_ctrl, exp_rgb);
        end
        if (out_ctrl.vEnd) nvend++;
      end
      checks++;
      if (!s_tready) failures++;
      exp_ctrl = CTRL_IDLE;
      if (s_tvalid) begin
        exp_ctrl.valid  = 1;
        exp_ctrl.hStart = (mc == 0);
        exp_ctrl.hEnd   = (mc == W - 1);
        exp_ctrl.vStart = (mr == 0 && mc == 0);
        exp_ctrl.vEnd   = (mr == H - 1 && mc == W - 1);
        exp_rgb = s_tdata;
        if (mc == W - 1) begin mc = 0; mr = (mr == H - 1) ? 0 : mr + 1; end
        else mc++;
      end
      have = 1;
    end
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
