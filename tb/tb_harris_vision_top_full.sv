// tb_harris_vision_top_full: the whole pipeline at its default size: three full
// 1280x1024 frames: grey with corner overlay, median and sharpen; edge map
// with corners; unfiltered colour.
//
// The expected output is built frame by frame from the reference models:
// grey -> Sobel -> edge (if on) -> median (if on) -> sharpen (if on), Harris on
// the Sobel gradients, the corner flag shifted by one line+pixel and the
// colour input by three, then the output mux. Every output pixel, the corner
// flag, the LEDs, the frame control and the 13-clock latency are checked, and
// each mechanism of the design is counted and must have occurred.
module tb_harris_vision_top_full;
  import pixel_stream_pkg::*;
  import tb_video_pkg::*;
  localparam int W = 1280, H = 1024, NF = 3;
  localparam int ETHR = 300;
  localparam longint HTHR = 64'sd1000000;
  // Switch setting per frame (sw[0] grey, [1] edge, [2] corner, [3] median, [4] sharpen).
  localparam logic [7:0] SW_TAB [3] = '{8'h1D, 8'h06, 8'h00};

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  pix_ctrl_t sctrl, out_ctrl;
  int srow, scol, sframe, orow, ocol, oframe;
  logic sdone, cerr, out_corner;
  rgb_t in_rgb, out_rgb;
  logic [7:0] sw, led;
  int checks = 0, failures = 0, cyc = 0, npix = 0, t_in = -1, t_out = -1;
  img_t rgb [NF];
  img_t exp_rgb [NF];
  img_t exp_cor [NF];
  int n_sat = 0, n_painted = 0, n_edge_px = 0, n_colour = 0, n_grey = 0, n_gap = 0;
  int n_med_changed = 0, n_switch = 0;
  int n_on [5];
  bit in_line = 0;

  tb_stream_src #(.IMG_W(W), .IMG_H(H), .NFRAMES(NF), .HBLANK(8), .VBLANK(16), .GAP_PCT(5)) src (
    .clk, .rst, .run, .ctrl(sctrl), .row(srow), .col(scol), .frame(sframe), .done(sdone));
  assign in_rgb = sctrl.valid ? rgb_t'(rgb[sframe][srow * W + scol]) : '0;
  // The switches are set for frame f while frame f-1 ends (src.f already points at f).
  assign sw = SW_TAB[src.f < NF ? src.f : NF - 1];

  harris_vision_top dut (
    .clk, .rst, .in_rgb, .in_ctrl(sctrl), .sw, .edge_thr(MAG_W'(ETHR)), .harris_thr(RESP_W'(HTHR)),
    .out_rgb, .out_ctrl, .out_corner, .led);

  tb_stream_pos #(.IMG_W(W), .IMG_H(H)) pos (.clk, .rst, .ctrl(out_ctrl), .row(orow), .col(ocol),
                                             .frame(oframe), .ctrl_err(cerr));

  task automatic build_expected(input int f);
    img_t gry, gx, gy, cen, e, m, s, cor, cor_a, rgb_a;
    limg_t resp;
    filt_en_t en;
    int k;
    en = filt_en_t'(SW_TAB[f][4:0]);
    gry = new[W * H];
    foreach (gry[k2]) gry[k2] = gray_ref((rgb[f][k2] >> 16) & 255, (rgb[f][k2] >> 8) & 255, rgb[f][k2] & 255);
    sobel_ref(gry, W, H, gx, gy, cen);
    e = new[W * H];
    foreach (e[k2]) e[k2] = edge_ref(gx[k2], gy[k2], cen[k2], ETHR, en.sobel);
    median_ref(e, W, H, en.median, m);
    sharpen_ref(m, W, H, en.sharpen, s, n_sat);
    harris_ref(gx, gy, W, H, 3, 41, 10, resp);
    cor = new[W * H];
    foreach (cor[k2]) cor[k2] = (resp[k2] > HTHR) ? 1 : 0;
    shift_ref(cor, W, H, 1, 1, cor_a);
    shift_ref(rgb[f], W, H, 3, 3, rgb_a);
    exp_rgb[f] = new[W * H];
    exp_cor[f] = cor_a;
    for (k = 0; k < W * H; k++) begin
      if (en.corner && cor_a[k] != 0) begin
        exp_rgb[f][k] = 32'hFF0000;
        n_painted++;
      end else if (en.gray || en.sobel || en.median || en.sharpen) begin
        exp_rgb[f][k] = (s[k] << 16) | (s[k] << 8) | s[k];
        n_grey++;
      end else begin
        exp_rgb[f][k] = rgb_a[k];
        n_colour++;
      end
      if (en.sobel && e[k] == 255) n_edge_px++;
      if (en.median && m[k] != e[k]) n_med_changed++;
    end
    for (int b = 0; b < 5; b++) if (en[b]) n_on[b]++;
    if (f > 0 && SW_TAB[f] != SW_TAB[f-1]) n_switch++;
  endtask

  initial begin
    for (int b = 0; b < 5; b++) n_on[b] = 0;
    for (int f = 0; f < NF; f++) begin
      make_picture(W, H, f * 5, rgb[f]);
      build_expected(f);
    end
    $display("reference frames built");
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);

    run <= 1;
    wait (sdone);
    repeat (80) @(posedge clk);
    checks++;
    if (npix != NF * W * H) begin failures++; $display("pixel count %0d", npix); end
    checks++;
    if (t_out - t_in != LAT_TOP) begin failures++; $display("latency %0d", t_out - t_in); end
    // Every mechanism must have happened.
    checks++; if (n_on[0] == 0) begin failures++; $display("grey never selected"); end
    checks++; if (n_on[1] == 0 || n_edge_px == 0) begin failures++; $display("edge filter never active"); end
    checks++; if (n_on[2] == 0 || n_painted == 0) begin failures++; $display("no corner painted"); end
    checks++; if (n_on[3] == 0 || n_med_changed == 0) begin failures++; $display("median never changed a pixel"); end
    checks++; if (n_on[4] == 0 || n_sat == 0) begin failures++; $display("sharpen never saturated"); end
    checks++; if (n_colour == 0) begin failures++; $display("colour path never shown"); end
    checks++; if (n_gap == 0) begin failures++; $display("no idle cycles inside lines"); end

    checks++; if (2 > 0 && n_switch < 2) begin failures++; $display("only %0d mode switches", n_switch); end
    $display("mechanisms: grey %0d edge %0d corner %0d median %0d sharpen %0d frames; painted %0d edge px %0d median changes %0d saturations %0d colour px %0d gaps %0d switches %0d",
             n_on[0], n_on[1], n_on[2], n_on[3], n_on[4], n_painted, n_edge_px, n_med_changed, n_sat, n_colour, n_gap, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && sctrl.valid && t_in < 0) t_in = cyc;
    if (sctrl.valid && sctrl.hStart) in_line = 1;
    if (in_line && !sctrl.valid) n_gap++;
    if (sctrl.valid && sctrl.hEnd) in_line = 0;
    if (!rst && out_ctrl.valid) begin
      int k;
      if (t_out < 0) t_out = cyc;
      npix++;
      k = orow * W + ocol;
      checks++;
      if (cerr || oframe >= NF || oframe < 0) begin failures++; $display("control error at %0d: %b f%0d r%0d c%0d", cyc, out_ctrl, oframe, orow, ocol); end
      else begin
        checks++;
        if (int'(out_rgb) != exp_rgb[oframe][k] || int'(out_corner) != exp_cor[oframe][k]) begin
          failures++;
          if (failures < 20)
            $display("f%0d r%0d c%0d got %06h/%0d exp %06h/%0d", oframe, orow, ocol, out_rgb, out_corner,
                     exp_rgb[oframe][k], exp_cor[oframe][k]);
        end
        checks++;
        if (led != {3'b000, SW_TAB[oframe][4:0]}) begin failures++; $display("led %b in frame %0d", led, oframe); end
      end
    end
    if (cyc > 6000000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
