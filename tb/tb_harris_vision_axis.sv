// tb_harris_vision_axis: end-to-end test of the AXI4-Stream IP on small frames
// (48x32). The thresholds are set and read back over AXI4-Lite
// first. Seven frames step through the switch settings: colour, grey,
// edge+corners, grey+corners+median, grey+sharpen, everything, colour again.
//
// The expected output is built frame by frame from the reference models:
// grey -> Sobel -> edge (if on) -> median (if on) -> sharpen (if on), Harris on
// the Sobel gradients, the corner flag shifted by one line+pixel and the
// colour input by three, then the output mux. Every output pixel, the corner
// flag, the LEDs, the frame control and the 13-clock latency are checked, and
// each mechanism of the design is counted and must have occurred.
module tb_harris_vision_axis;
  import pixel_stream_pkg::*;
  import tb_video_pkg::*;
  localparam int W = 48, H = 32, NF = 7;
  localparam int ETHR = 250;
  localparam longint HTHR = 64'sd800000;
  // Switch setting per frame (sw[0] grey, [1] edge, [2] corner, [3] median, [4] sharpen).
  localparam logic [7:0] SW_TAB [7] = '{8'h00, 8'h01, 8'h06, 8'h0D, 8'h11, 8'hFF, 8'h00};

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

  // AXI4-Stream wrapping: the source's control word becomes TUSER/TLAST, and
  // the output beats are turned back into a control word for checking.
  logic m_tvalid, m_tuser, m_tlast, s_tready, overrun, m_tready, sol_o;
  int   orow_t;
  harris_vision_axis #(.LINE_LEN(W), .FRAME_LINES(H)) dut (
    .clk, .rst, .s_axis_tdata(in_rgb), .s_axis_tvalid(sctrl.valid), .s_axis_tready(s_tready),
    .s_axis_tuser(sctrl.valid & sctrl.hStart & sctrl.vStart), .s_axis_tlast(sctrl.valid & sctrl.hEnd),
    .m_axis_tdata(out_rgb), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tuser(m_tuser), .m_axis_tlast(m_tlast), .m_axis_corner(out_corner),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .sw, .led, .overrun);
  assign m_tready = 1'b1;

  // AXI4-Lite master tasks for the register block.
  logic [3:0] awaddr = '0, araddr = '0, wstrb = '0;
  logic [31:0] wdata = '0, rdata;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0, awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d, input logic [3:0] strb);
    int n = 0;
    @(posedge clk);
    awaddr <= a; awvalid <= 1; wdata <= d; wstrb <= strb; wvalid <= 1;
    do @(negedge clk); while (!(awready && wready) && ++n < 20);
    @(posedge clk);
    awvalid <= 0; wvalid <= 0; bready <= 1;
    do @(negedge clk); while (!bvalid && ++n < 40);
    @(posedge clk);
    bready <= 0;
    checks++;
    if (n >= 40 || bresp != 2'b00) begin failures++; $display("AXI4-Lite write to %h failed", a); end
  endtask
  task automatic axil_read(input logic [3:0] a, output logic [31:0] d);
    int n = 0;
    @(posedge clk);
    araddr <= a; arvalid <= 1;
    do @(negedge clk); while (!arready && ++n < 20);
    @(posedge clk);
    arvalid <= 0;
    // Hold RREADY low for a few clocks: the response must wait.
    repeat (3) @(posedge clk);
    rready <= 1;
    do @(negedge clk); while (!rvalid && ++n < 40);
    d = rdata;
    @(posedge clk);
    rready <= 0;
    checks++;
    if (n >= 40 || rresp != 2'b00) begin failures++; $display("AXI4-Lite read of %h failed", a); end
  endtask
  task automatic axil_expect(input logic [3:0] a, input logic [31:0] e);
    logic [31:0] d;
    axil_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("register %h reads %h, expected %h", a, d, e); end
  endtask
  always_comb begin
    out_ctrl        = CTRL_IDLE;
    out_ctrl.valid  = m_tvalid;
    out_ctrl.hStart = m_tvalid & (m_tuser | sol_o);
    out_ctrl.vStart = m_tvalid & m_tuser;
    out_ctrl.hEnd   = m_tvalid & m_tlast;
    out_ctrl.vEnd   = m_tvalid & m_tlast & (m_tuser ? (H == 1) : (sol_o ? orow_t + 1 == H - 1 : orow_t == H - 1));
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      sol_o <= 1'b1; orow_t <= 0;
    end else if (m_tvalid) begin
      sol_o  <= m_tlast;
      orow_t <= m_tuser ? 0 : (sol_o ? orow_t + 1 : orow_t);
    end
  end
  // The source never waits.
  always @(posedge clk) if (!rst && !s_tready) begin failures++; $display("s_axis_tready low"); end

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
    // Reset values, then the test thresholds through AXI4-Lite.
    axil_expect(4'h0, 32'd300);
    axil_expect(4'h4, 32'd1000000);
    axil_expect(4'h8, 32'd0);
    axil_write(4'h0, 32'hFFFF_FFFF, 4'b0001);     // byte lane 0 only
    axil_expect(4'h0, 32'h0000_01FF);               // 300 = 0x12C -> 0x1FF
    axil_write(4'h0, 32'(ETHR), 4'b1111);
    axil_write(4'h4, 32'(HTHR), 4'b1111);
    axil_write(4'h8, 32'(HTHR >>> 32), 4'b1111);
    axil_write(4'hC, 32'hFFFF_FFFF, 4'b1111);     // read-only: ignored
    axil_expect(4'h0, 32'(ETHR));
    axil_expect(4'h4, 32'(HTHR));
    axil_expect(4'h8, 32'(HTHR >>> 32) & 32'hF);
    axil_expect(4'hC, 32'd0);
    run <= 1;
    wait (sdone);
    repeat (80) @(posedge clk);
    checks++;
    if (npix != NF * W * H) begin failures++; $display("pixel count %0d", npix); end
    checks++;
    if (t_out - t_in != LAT_TOP + 2) begin failures++; $display("latency %0d", t_out - t_in); end
    // Every mechanism must have happened.
    checks++; if (n_on[0] == 0) begin failures++; $display("grey never selected"); end
    checks++; if (n_on[1] == 0 || n_edge_px == 0) begin failures++; $display("edge filter never active"); end
    checks++; if (n_on[2] == 0 || n_painted == 0) begin failures++; $display("no corner painted"); end
    checks++; if (n_on[3] == 0 || n_med_changed == 0) begin failures++; $display("median never changed a pixel"); end
    checks++; if (n_on[4] == 0 || n_sat == 0) begin failures++; $display("sharpen never saturated"); end
    checks++; if (n_colour == 0) begin failures++; $display("colour path never shown"); end
    checks++; if (n_gap == 0) begin failures++; $display("no idle cycles inside lines"); end
    // Status register: filters of the last frame, no overrun.
    axil_expect(4'hC, {24'd0, 3'b000, SW_TAB[NF-1][4:0]});
    checks++; if (overrun) begin failures++; $display("overrun with an always-ready sink"); end
    checks++; if (5 > 0 && n_switch < 5) begin failures++; $display("only %0d mode switches", n_switch); end
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
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
