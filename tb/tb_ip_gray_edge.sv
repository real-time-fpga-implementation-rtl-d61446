// tb_ip_gray_edge: RGB test pictures through the first IP block: frame 0 with the
// edge filter off (grey output), frame 1 with it on. The intensity output and
// the corner flag (11-clock latency, separate control) are both compared with
// the chained grey, Sobel, edge and Harris reference models.
module tb_ip_gray_edge;
  import pixel_stream_pkg::*;
  import tb_video_pkg::*;
  localparam int W = 32, H = 20, NF = 2, LAT = LAT_IP1_Y;

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  pix_ctrl_t sctrl, out_ctrl;
  int srow, scol, sframe, orow, ocol, oframe;
  logic sdone, cerr;
  int checks = 0, failures = 0, cyc = 0, npix = 0, t_in = -1, t_out = -1;
  rgb_t in_rgb;
  logic [7:0] y_out;
  logic edge_en, corner;
  logic signed [RESP_W-1:0] resp;
  pix_ctrl_t c_ctrl;
  int crow, ccol, cframe, nedge = 0, ncorner = 0, ncpix = 0, t_c = -1;
  logic cerr2;
  localparam int ETHR = 300;
  localparam longint HTHR = 64'sd1000000;
  img_t rgb [NF];
  img_t gry [NF];
  img_t egx [NF];
  img_t egy [NF];
  img_t ecen [NF];
  limg_t eresp [NF];

  tb_stream_src #(.IMG_W(W), .IMG_H(H), .NFRAMES(NF), .VBLANK(8)) src (
    .clk, .rst, .run, .ctrl(sctrl), .row(srow), .col(scol), .frame(sframe), .done(sdone));

  assign in_rgb = sctrl.valid ? rgb_t'(rgb[sframe][srow * W + scol]) : '0;
  logic sel_d [4];
  always_ff @(posedge clk) begin
    sel_d[0] <= sframe[0];
    for (int i = 1; i < 4; i++) sel_d[i] <= sel_d[i-1];
  end
  assign edge_en = sel_d[2];   // sampled 4 clocks after the pixel enters
  ip_gray_edge #(.LINE_LEN(W)) dut (.clk, .rst, .in_rgb, .in_ctrl(sctrl), .edge_en,
    .edge_thr(MAG_W'(ETHR)), .harris_thr(RESP_W'(HTHR)), .y_out, .y_ctrl(out_ctrl),
    .corner, .resp, .c_ctrl);
  tb_stream_pos #(.IMG_W(W), .IMG_H(H)) cpos (.clk, .rst, .ctrl(c_ctrl), .row(crow), .col(ccol),
                                              .frame(cframe), .ctrl_err(cerr2));
  always @(posedge clk) begin
    if (!rst && c_ctrl.valid) begin
      int k;
      if (t_c < 0) t_c = cyc;
      k = crow * W + ccol;
      ncpix++;
      checks++;
      if (cerr2 || cframe >= NF || corner != (eresp[cframe][k] > HTHR) || longint'(resp) != eresp[cframe][k]) begin
        failures++;
        $display("corner f%0d r%0d c%0d got %0d exp %0d", cframe, crow, ccol, resp, eresp[cframe][k]);
      end
      if (corner) ncorner++;
    end
  end

  tb_stream_pos #(.IMG_W(W), .IMG_H(H)) pos (.clk, .rst, .ctrl(out_ctrl), .row(orow), .col(ocol),
                                             .frame(oframe), .ctrl_err(cerr));

  initial begin
    for (int f = 0; f < NF; f++) begin
      make_picture(W, H, f * 7, rgb[f]);
      gry[f] = new[W * H];
      foreach (gry[f][k]) gry[f][k] = gray_ref((rgb[f][k] >> 16) & 255, (rgb[f][k] >> 8) & 255, rgb[f][k] & 255);
      sobel_ref(gry[f], W, H, egx[f], egy[f], ecen[f]);
      harris_ref(egx[f], egy[f], W, H, 3, 41, 10, eresp[f]);
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
    if (nedge == 0 || ncorner == 0) begin failures++; $display("edges %0d corners %0d", nedge, ncorner); end
    checks++;
    if (ncpix != NF * W * H || t_c - t_in != LAT_IP1_CORNER) begin failures++; $display("corner path count %0d latency %0d", ncpix, t_c - t_in); end
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
        if (int'(y_out) != edge_ref(egx[oframe][k], egy[oframe][k], ecen[oframe][k], ETHR, oframe == 1)) begin
          failures++;
          $display("y f%0d r%0d c%0d got %0d", oframe, orow, ocol, y_out);
        end
        if (oframe == 1 && y_out == 8'd255) nedge++;
      end
    end
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
