// tb_gray_converter: random RGB pixels plus black, white and pure primaries
// through the grey converter; every output is compared with the BT.601
// fixed-point formula, the control word must come out 2 clocks after it went in.
module tb_gray_converter;
  import pixel_stream_pkg::*;
  localparam int N = 2000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  rgb_t      in_rgb;
  pix_ctrl_t in_ctrl, out_ctrl;
  logic [7:0] out_y;
  int checks = 0, failures = 0, cyc = 0;

  gray_converter dut (.clk, .rst, .in_rgb, .in_ctrl, .out_y, .out_ctrl);

  rgb_t      hist_rgb  [$];
  pix_ctrl_t hist_ctrl [$];

  function automatic rgb_t stim(input int k);
    case (k)
      0: return '{8'd0, 8'd0, 8'd0};
      1: return '{8'd255, 8'd255, 8'd255};
      2: return '{8'd255, 8'd0, 8'd0};
      3: return '{8'd0, 8'd255, 8'd0};
      4: return '{8'd0, 8'd0, 8'd255};
      default: return rgb_t'($urandom);
    endcase
  endfunction

  initial begin
    in_rgb = '0; in_ctrl = CTRL_IDLE;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      in_rgb  <= stim(k);
      in_ctrl <= pix_ctrl_t'($urandom);
    end
    @(posedge clk);
    in_ctrl <= CTRL_IDLE;
    repeat (5) @(posedge clk);
    // Fixed points of the formula.
    checks++; if (gray_ref_fn(8'd255, 8'd255, 8'd255) != 255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gray_ref_fn(input logic [7:0] r, input logic [7:0] g, input logic [7:0] b);
    return (77 * int'(r) + 150 * int'(g) + 29 * int'(b) + 128) >> 8;
  endfunction

  // Scoreboard: output at cycle t belongs to the input of cycle t-2.
  always @(posedge clk) begin
    if (!rst) begin
      hist_rgb.push_back(in_rgb);
      hist_ctrl.push_back(in_ctrl);
      if (hist_rgb.size() > 2) begin
        rgb_t x; pix_ctrl_t xc;
        x  = hist_rgb.pop_front();
        xc = hist_ctrl.pop_front();
        checks++;
        if (out_ctrl !== xc) begin
          failures++; $display("ctrl mismatch at cycle %0d", cyc);
        end
        if (xc.valid) begin
          checks++;
          if (int'(out_y) != gray_ref_fn(x.r, x.g, x.b)) begin
            failures++;
            $display("Y mismatch rgb=%h got %0d exp %0d", x, out_y, gray_ref_fn(x.r, x.g, x.b));
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
