// tb_filter_regs: random AXI4-Lite traffic into the register block. AW and W
// arrive at random, separate times, BREADY and RREADY are held off at random,
// and WSTRB is random. A model of the registers, fed from the write
// handshakes, predicts every read; the threshold outputs are compared with
// the model every clock, and the
// STATUS register must follow random LED and overrun inputs. A response must
// be held until it is taken, and no second write may be accepted while a
// response is pending.
module tb_filter_regs;
  import pixel_stream_pkg::*;
  localparam int NTRANS = 1500;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [3:0]  awaddr = '0, araddr = '0, wstrb = '0;
  logic [31:0] wdata = '0, rdata;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [MAG_W-1:0] edge_thr;
  logic signed [RESP_W-1:0] harris_thr;
  logic [7:0] led = '0;
  logic overrun = 0;
  int checks = 0, failures = 0, cyc = 0, nwr = 0, nrd = 0, nstall = 0, npartial = 0;
  logic [31:0] m [4] = '{32'd300, 32'd1000000, 32'd0, 32'd0};

  filter_regs dut (.clk, .rst, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
                   .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp, .rvalid,
                   .rready, .edge_thr, .harris_thr, .led, .overrun);

  function automatic logic [31:0] merge(input logic [31:0] o, input logic [31:0] n, input logic [3:0] s);
    for (int b = 0; b < 4; b++) if (s[b]) o[8*b +: 8] = n[8*b +: 8];
    return o;
  endfunction

  function automatic logic [31:0] model_read(input logic [3:0] a);
    case (a[3:2])
      2'd0: return m[0] & 32'h7FF;
      2'd1: return m[1];
      2'd2: return m[2] & 32'hF;
      default: return {23'd0, overrun, led};
    endcase
  endfunction

  task automatic do_write(input logic [3:0] a, input logic [31:0] d, input logic [3:0] s);
    int n = 0;
    // AW and W may arrive in either order, some clocks apart.
    if ($urandom_range(1) != 0) begin awaddr <= a; awvalid <= 1; end
    else begin wdata <= d; wstrb <= s; wvalid <= 1; end
    repeat ($urandom_range(3)) begin
      @(negedge clk);
      checks++;
      if (awready || wready) begin failures++; $display("write accepted with only one channel valid"); end
    end
    awaddr <= a; awvalid <= 1; wdata <= d; wstrb <= s; wvalid <= 1;
    do @(negedge clk); while (!(awready && wready) && ++n < 20);
    @(posedge clk);
    awvalid <= 0; wvalid <= 0;
    if (s != 4'hF) npartial++;
    nwr++;
    // Hold BREADY off for a while; BVALID must stay.
    repeat ($urandom_range(3)) begin
      @(posedge clk);
      if ($urandom_range(3) == 0) nstall++;
    end
    bready <= 1;
    do @(negedge clk); while (!bvalid && ++n < 40);
    @(posedge clk);
    bready <= 0;
    checks++;
    if (n >= 40 || bresp != 2'b00) begin failures++; $display("write %h: no OKAY response", a); end
  endtask

  task automatic do_read(input logic [3:0] a);
    int n = 0;
    logic [31:0] e;
    araddr <= a; arvalid <= 1;
    do @(negedge clk); while (!arready && ++n < 20);
    @(posedge clk);
    arvalid <= 0;
    e = model_read(a);
    repeat ($urandom_range(3)) @(posedge clk);
    rready <= 1;
    do @(negedge clk); while (!rvalid && ++n < 40);
    checks++;
    if (n >= 40 || rresp != 2'b00 || rdata !== e) begin
      failures++;
      if (failures < 20) $display("read %h: got %h exp %h", a, rdata, e);
    end
    @(posedge clk);
    rready <= 0;
    nrd++;
  endtask

  // Register model, updated from the write handshakes seen on the bus.
  always @(posedge clk)
    if (!rst && awvalid && awready && wvalid && wready && awaddr[3:2] != 2'd3)
      m[awaddr[3:2]] = merge(m[awaddr[3:2]], wdata, wstrb);

  // Protocol and output checks every clock, between the active edges.
  logic bvalid_q = 0, bready_q = 0, rvalid_q = 0, rready_q = 0;
  logic [31:0] rdata_q;
  always @(negedge clk) begin
    cyc++;
    if (!rst) begin
      checks++;
      if (edge_thr !== m[0][MAG_W-1:0] || harris_thr !== {m[2][3:0], m[1]}) begin
        failures++;
        if (failures < 20) $display("threshold outputs %h %h, model %h %h%h", edge_thr, harris_thr, m[0], m[2], m[1]);
      end
      if (bvalid_q && !bready_q) begin
        checks++; if (!bvalid) begin failures++; $display("BVALID dropped"); end
      end
      if (rvalid_q && !rready_q) begin
        checks++; if (!rvalid || rdata !== rdata_q) begin failures++; $display("read response changed"); end
      end
      if (bvalid) begin
        checks++; if (awready || wready) begin failures++; $display("write accepted with a response pending"); end
      end
    end
    bvalid_q <= bvalid; bready_q <= bready; rvalid_q <= rvalid; rready_q <= rready; rdata_q <= rdata;
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int a = 0; a < 4; a++) do_read(4'(a * 4));
    for (int t = 0; t < NTRANS; t++) begin
      led <= 8'($urandom); overrun <= 1'($urandom);
      @(posedge clk);
      if ($urandom_range(1) != 0) do_write(4'($urandom_range(3) * 4), $urandom, $urandom_range(3) == 0 ? 4'($urandom) : 4'hF);
      else do_read(4'($urandom_range(3) * 4));
    end
    checks++;
    if (nwr < 100 || nrd < 100 || npartial < 20 || nstall == 0) begin
      failures++; $display("too little traffic: %0d writes %0d reads %0d partial", nwr, nrd, npartial);
    end
    $display("writes %0d reads %0d partial-strobe writes %0d", nwr, nrd, npartial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
