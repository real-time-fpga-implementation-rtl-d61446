// tb_filter_control: drives random switch settings and a pixel-control
// stream with occasional frame starts. The enables must change only on the
// clock after a valid frame-start pixel, must then equal sw[4:0] as it was
// two clocks earlier (synchroniser), and the LEDs must mirror them.
module tb_filter_control;
  import pixel_stream_pkg::*;
  localparam int N = 4000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] sw, led;
  pix_ctrl_t in_ctrl;
  filt_en_t en;
  int checks = 0, failures = 0, cyc = 0, nchange = 0;

  filter_control dut (.clk, .rst, .sw, .in_ctrl, .en, .led);

  logic [7:0] sw_h [3];
  filt_en_t model;
  bit was_start;

  initial begin
    sw = '0; in_ctrl = CTRL_IDLE;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      if ($urandom_range(9) == 0) sw <= 8'($urandom);
      in_ctrl <= CTRL_IDLE;
      in_ctrl.valid  <= ($urandom_range(3) != 0);
      in_ctrl.hStart <= ($urandom_range(3) == 0);
      in_ctrl.vStart <= ($urandom_range(5) == 0);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nchange < 20) begin failures++; $display("only %0d selection changes", nchange); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: sw seen through two flops, latched on a valid frame start.
  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      model = '0; sw_h[0] = '0; sw_h[1] = '0; sw_h[2] = '0;
    end else begin
      checks++;
      if (en != model || led != {3'b000, model}) begin
        failures++;
        $display("cycle %0d: en %b expected %b led %b", cyc, en, model, led);
      end
      // what the DUT samples at this edge
      if (in_ctrl.valid && in_ctrl.hStart && in_ctrl.vStart) begin
        if (model != filt_en_t'(sw_h[1][4:0])) nchange++;
        model = filt_en_t'(sw_h[1][4:0]);
      end
      sw_h[1] = sw_h[0];
      sw_h[0] = sw;
    end
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
