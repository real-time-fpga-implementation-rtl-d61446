// tb_pixel_to_axis: random pixel-control words and data into the output
// bridge. Each beat is checked one clock later (TVALID = valid, TUSER =
// hStart & vStart & valid, TLAST = hEnd & valid, data and corner bit). In the
// second half the sink drops TREADY; the sticky overrun flag must rise on the
// first beat offered while TREADY is low and never before.
module tb_pixel_to_axis;
  import pixel_stream_pkg::*;
  localparam int N = 2000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  rgb_t in_rgb, m_tdata;
  logic in_corner, m_tvalid, m_tready, m_tuser, m_tlast, m_corner, overrun;
  pix_ctrl_t in_ctrl;
  int checks = 0, failures = 0, cyc = 0;
  bit have = 0, exp_over = 0;
  rgb_t p_rgb; logic p_corner; pix_ctrl_t p_ctrl;

  pixel_to_axis dut (.clk, .rst, .in_rgb, .in_corner, .in_ctrl, .m_tdata, .m_tvalid, .m_tready,
                     .m_tuser, .m_tlast, .m_corner, .overrun);

  initial begin
    in_rgb = '0; in_corner = 0; in_ctrl = CTRL_IDLE; m_tready = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      in_rgb    <= rgb_t'($urandom);
      in_corner <= 1'($urandom);
      in_ctrl   <= pix_ctrl_t'($urandom);
      m_tready  <= (k < N / 2) ? 1'b1 : 1'($urandom_range(7) != 0);
    end
    @(posedge clk);
    in_ctrl <= CTRL_IDLE;
    repeat (3) @(posedge clk);
    checks++;
    if (!overrun) begin failures++; $display("overrun never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (have) begin
        checks++;
        if (m_tvalid != p_ctrl.valid || m_tuser != (p_ctrl.valid & p_ctrl.hStart & p_ctrl.vStart) ||
            m_tlast != (p_ctrl.valid & p_ctrl.hEnd) || m_tdata != p_rgb || m_corner != p_corner ||
            overrun != exp_over) begin
          failures++;
          $display("cycle %0d: beat mismatch v%0d u%0d l%0d o%0d", cyc, m_tvalid, m_tuser, m_tlast, overrun);
        end
        if (m_tvalid && !m_tready) exp_over = 1;
      end
      p_rgb = in_rgb; p_corner = in_corner; p_ctrl = in_ctrl; have = 1;
    end
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
