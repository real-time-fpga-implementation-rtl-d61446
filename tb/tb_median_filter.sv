// tb_median_filter: random frames, one with the filter bypassed and one of salt-and-pepper
// noise, through the 3x3 median filter; every output pixel is compared with a
// sorting reference model, plus the 2-clock latency and the frame control.
module tb_median_filter;
  import pixel_stream_pkg::*;
  import tb_video_pkg::*;
  localparam int W = 16, H = 10, NF = 3, LAT = LAT_MEDIAN;

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  pix_ctrl_t sctrl, out_ctrl;
  int srow, scol, sframe, orow, ocol, oframe;
  logic sdone, cerr;
  int checks = 0, failures = 0, cyc = 0, npix = 0, t_in = -1, t_out = -1;
  logic [7:0] in_pix, out_pix;
  logic en;
  img_t yin [NF];
  img_t exp_img [NF];
  int nchanged = 0;

  tb_stream_src #(.IMG_W(W), .IMG_H(H), .NFRAMES(NF), .VBLANK(8)) src (
    .clk, .rst, .run, .ctrl(sctrl), .row(srow), .col(scol), .frame(sframe), .done(sdone));

  assign in_pix = sctrl.valid ? 8'(yin[sframe][srow * W + scol]) : 8'hA5;
  assign en = (oframe_in() != 1);
  function automatic int oframe_in();
    return sframe;
  endfunction
  median_filter #(.LINE_LEN(W)) dut (.clk, .rst, .in_pix, .in_ctrl(sctrl), .en, .out_pix, .out_ctrl);

  tb_stream_pos #(.IMG_W(W), .IMG_H(H)) pos (.clk, .rst, .ctrl(out_ctrl), .row(orow), .col(ocol),
                                             .frame(oframe), .ctrl_err(cerr));

  initial begin
    for (int f = 0; f < NF; f++) begin
      yin[f] = new[W * H];
      foreach (yin[f][k]) yin[f][k] = (f == 2) ? (int'($urandom_range(9)) == 0 ? 255 : 100) : int'($urandom_range(255));
      median_ref(yin[f], W, H, f != 1, exp_img[f]);
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
    if (nchanged == 0) begin failures++; $display("median never removed a noise pixel"); end
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
        if (int'(out_pix) != exp_img[oframe][k]) begin
          failures++;
          $display("f%0d r%0d c%0d got %0d exp %0d", oframe, orow, ocol, out_pix, exp_img[oframe][k]);
        end
        if (oframe == 2 && orow > 0 && ocol > 0 && yin[2][(orow - 1) * W + ocol - 1] != int'(out_pix)) nchanged++;
      end
    end
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
