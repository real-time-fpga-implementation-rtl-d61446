// tb_sobel_edge: random gradients, centre pixels, thresholds and enables, one
// per clock, through the Sobel edge stage. Each output is compared one clock
// later with |gx|+|gy| > thr (255/0) or the centre pixel when disabled; cases
// exactly at the threshold are forced in regularly.
module tb_sobel_edge;
  import pixel_stream_pkg::*;
  localparam int N = 3000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [GRAD_W-1:0] gx, gy;
  logic [7:0] center, out_pix;
  logic [MAG_W-1:0] edge_thr;
  logic en;
  pix_ctrl_t in_ctrl, out_ctrl;
  int checks = 0, failures = 0, cyc = 0, n255 = 0, n0 = 0;

  sobel_edge dut (.clk, .rst, .gx, .gy, .center, .in_ctrl, .edge_thr, .en, .out_pix, .out_ctrl);

  function automatic int expect_pix(input int x, input int y, input int c, input int t, input bit e);
    int m;
    m = (x < 0 ? -x : x) + (y < 0 ? -y : y);
    if (!e) return c;
    return (m > t) ? 255 : 0;
  endfunction

  int px, py, pc, pt; bit pe; pix_ctrl_t pctrl; bit have = 0;

  initial begin
    gx = '0; gy = '0; center = '0; edge_thr = '0; en = 0; in_ctrl = CTRL_IDLE;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      int x, y;
      @(posedge clk);
      x = int'($urandom_range(2040)) - 1020;
      y = int'($urandom_range(2040)) - 1020;
      gx <= GRAD_W'(x);
      gy <= GRAD_W'(y);
      center <= 8'($urandom);
      en <= ($urandom_range(3) != 0);
      in_ctrl <= pix_ctrl_t'($urandom);
      if (k % 7 == 0) edge_thr <= MAG_W'((x < 0 ? -x : x) + (y < 0 ? -y : y));
      else edge_thr <= MAG_W'($urandom_range(2040));
    end
    @(posedge clk);
    in_ctrl <= CTRL_IDLE;
    repeat (3) @(posedge clk);
    checks++;
    if (n255 < 100 || n0 < 100) begin failures++; $display("edge outcomes %0d/%0d", n255, n0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (have) begin
        checks++;
        if (out_ctrl != pctrl || int'(out_pix) != expect_pix(px, py, pc, pt, pe)) begin
          failures++;
          $display("cycle %0d: gx %0d gy %0d thr %0d en %0d got %0d", cyc, px, py, pt, pe, out_pix);
        end
        if (pe && out_pix == 8'd255) n255++;
        if (pe && out_pix == 8'd0) n0++;
      end
      px = int'(gx); py = int'(gy); pc = int'(center); pt = int'(edge_thr); pe = en;
      pctrl = in_ctrl; have = 1;
    end
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
