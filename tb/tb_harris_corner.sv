// tb_harris_corner: random and structured gradient frames through the Harris stage;
// the response R and the corner flag of every pixel are compared with an exact
// integer model of det(M) - k*trace(M)^2 with the 3x3 binomial window. Both
// corner and non-corner pixels must occur.
module tb_harris_corner;
  import pixel_stream_pkg::*;
  import tb_video_pkg::*;
  localparam int W = 20, H = 12, NF = 2, LAT = LAT_HARRIS;

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  pix_ctrl_t sctrl, out_ctrl;
  int srow, scol, sframe, orow, ocol, oframe;
  logic sdone, cerr;
  int checks = 0, failures = 0, cyc = 0, npix = 0, t_in = -1, t_out = -1;
  logic signed [GRAD_W-1:0] gx, gy;
  logic corner;
  logic signed [RESP_W-1:0] resp;
  localparam longint THR = 64'sd2000000;
  img_t ingx [NF];
  img_t ingy [NF];
  limg_t eresp [NF];
  int ncorner = 0, nflat = 0;

  tb_stream_src #(.IMG_W(W), .IMG_H(H), .NFRAMES(NF), .VBLANK(8)) src (
    .clk, .rst, .run, .ctrl(sctrl), .row(srow), .col(scol), .frame(sframe), .done(sdone));

  assign gx = sctrl.valid ? GRAD_W'(ingx[sframe][srow * W + scol]) : '0;
  assign gy = sctrl.valid ? GRAD_W'(ingy[sframe][srow * W + scol]) : '0;
  harris_corner #(.LINE_LEN(W)) dut (.clk, .rst, .gx, .gy, .in_ctrl(sctrl), .thr(RESP_W'(THR)),
                                      .corner, .resp, .out_ctrl);

  tb_stream_pos #(.IMG_W(W), .IMG_H(H)) pos (.clk, .rst, .ctrl(out_ctrl), .row(orow), .col(ocol),
                                             .frame(oframe), .ctrl_err(cerr));

  initial begin
    for (int f = 0; f < NF; f++) begin
      ingx[f] = new[W * H];
      ingy[f] = new[W * H];
      foreach (ingx[f][k]) begin
        if (f == 0) begin
          ingx[f][k] = int'($urandom_range(2040)) - 1020;
          ingy[f][k] = int'($urandom_range(2040)) - 1020;
        end else begin
          // strong x gradient on one half, strong y gradient in a block: mixed region = corner
          ingx[f][k] = ((k % W) >= 8 && (k % W) < 12) ? 900 : 0;
          ingy[f][k] = ((k / W) >= 4 && (k / W) < 8) ? -900 : 0;
        end
      end
      harris_ref(ingx[f], ingy[f], W, H, 3, 41, 10, eresp[f]);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run <= 1;
    wait (sdone);
    repeat (60) @(posedge clk);
    checks++;
    if (npix != NF * W * H) begin failures++; $display("pixel count %0d", npix); end
    checks++;
    if (t_out - t_in != LAT) begin failures++; $display("latency %0d", t_out - t_in); end
    checks++;
    if (ncorner == 0 || nflat == 0) begin failures++; $display("corners %0d flat %0d", ncorner, nflat); end
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
      if (cerr || oframe >= NF || oframe < 0) begin failures++; $display("control error at %0d", cyc); end
      else begin
        checks++;
        if (longint'(resp) != eresp[oframe][k] || corner != (eresp[oframe][k] > THR)) begin
          failures++;
          $display("f%0d r%0d c%0d got %0d/%0d exp %0d", oframe, orow, ocol, resp, corner, eresp[oframe][k]);
        end
        if (corner) ncorner++; else nflat++;
      end
    end
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
