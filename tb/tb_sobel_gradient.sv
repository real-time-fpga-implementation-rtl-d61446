// tb_sobel_gradient: streams random frames (with blanking and idle cycles
// inside lines) through the Sobel gradient stage and compares gx, gy and the
// window centre of every output pixel with a frame-level reference model,
// including the zero-padded first line and column. Checks the 2-clock latency
// and that the output control marks the frame correctly.
module tb_sobel_gradient;
  import pixel_stream_pkg::*;
  import tb_video_pkg::*;
  localparam int W = 16, H = 10, NF = 3, LAT = LAT_SOBEL;

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  pix_ctrl_t sctrl, out_ctrl;
  int srow, scol, sframe, orow, ocol, oframe;
  logic sdone, cerr;
  logic [7:0] in_pix, center;
  logic signed [GRAD_W-1:0] gx, gy;
  int checks = 0, failures = 0, cyc = 0, npix = 0, t_in = -1, t_out = -1;
  img_t yin [NF];
  img_t egx [NF];
  img_t egy [NF];
  img_t ecen [NF];

  tb_stream_src #(.IMG_W(W), .IMG_H(H), .NFRAMES(NF)) src (
    .clk, .rst, .run, .ctrl(sctrl), .row(srow), .col(scol), .frame(sframe), .done(sdone));
  assign in_pix = sctrl.valid ? 8'(yin[sframe][srow * W + scol]) : 8'hA5;

  sobel_gradient #(.LINE_LEN(W)) dut (.clk, .rst, .in_pix, .in_ctrl(sctrl), .gx, .gy, .center, .out_ctrl);

  tb_stream_pos #(.IMG_W(W), .IMG_H(H)) pos (.clk, .rst, .ctrl(out_ctrl), .row(orow), .col(ocol),
                                             .frame(oframe), .ctrl_err(cerr));

  initial begin
    for (int f = 0; f < NF; f++) begin
      yin[f] = new[W * H];
      foreach (yin[f][k]) yin[f][k] = (f == 2) ? 255 * ((k / 3) % 2) : int'($urandom_range(255));
      sobel_ref(yin[f], W, H, egx[f], egy[f], ecen[f]);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run <= 1;
    wait (sdone);
    repeat (40) @(posedge clk);
    checks++;
    if (npix != NF * W * H) begin failures++; $display("pixel count %0d", npix); end
    checks++;
    if (t_out - t_in != LAT) begin failures++; $display("latency %0d", t_out - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && sctrl.valid && t_in < 0) t_in = cyc;
    if (!rst && out_ctrl.valid) begin
      int k;
      if (t_out < 0) t_out = cyc;
      npix++;
      k = orow * W + ocol;
      checks++;
      if (cerr || oframe >= NF) begin failures++; $display("control error at %0d", cyc); end
      else begin
        checks++;
        if (int'(gx) != egx[oframe][k] || int'(gy) != egy[oframe][k] || int'(center) != ecen[oframe][k]) begin
          failures++;
          $display("f%0d r%0d c%0d got %0d %0d %0d exp %0d %0d %0d", oframe, orow, ocol,
                   gx, gy, center, egx[oframe][k], egy[oframe][k], ecen[oframe][k]);
        end
      end
    end
    if (cyc > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
