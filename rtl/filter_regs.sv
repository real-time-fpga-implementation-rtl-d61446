// filter_regs: AXI4-Lite register block through which the processor sets the
// filter parameters and reads the filter status.
//
// Register map (32-bit registers, byte addresses):
//   0x0 EDGE_THR       [10:0] Sobel magnitude threshold, reset 300
//   0x4 HARRIS_THR_LO  [31:0] Harris threshold bits 31:0, reset 1000000
//   0x8 HARRIS_THR_HI  [3:0]  Harris threshold bits 35:32 (two's complement)
//   0xC STATUS (read)  [7:0] active filters as on the LEDs, [8] overrun
// Address bits 1:0 are ignored (word access only). Writes to STATUS and to
// unused bits are ignored; reads of unused bits are 0.
// The slave takes one transaction at a time: a write is accepted when both
// AWVALID and WVALID are high (AWREADY and WREADY pulse together) and is
// answered with BRESP = OKAY the next clock; a read is accepted on ARVALID and
// answered with RDATA/RRESP = OKAY the next clock. WSTRB is honoured per byte.
// New thresholds take effect immediately; software should change them between
// frames. A processor register interface for the filter parameters follows the
// original system; the map, the reset values and the timing are choices
// made here.
module filter_regs
  import pixel_stream_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  // AXI4-Lite slave
  input  logic [3:0]               awaddr,
  input  logic                     awvalid,
  output logic                     awready,
  input  logic [31:0]              wdata,
  input  logic [3:0]               wstrb,
  input  logic                     wvalid,
  output logic                     wready,
  output logic [1:0]               bresp,
  output logic                     bvalid,
  input  logic                     bready,
  input  logic [3:0]               araddr,
  input  logic                     arvalid,
  output logic                     arready,
  output logic [31:0]              rdata,
  output logic [1:0]               rresp,
  output logic                     rvalid,
  input  logic                     rready,
  // to and from the pipeline
  output logic [MAG_W-1:0]         edge_thr,
  output logic signed [RESP_W-1:0] harris_thr,
  input  logic [7:0]               led,
  input  logic                     overrun
);
  localparam logic [MAG_W-1:0]  EDGE_RESET   = MAG_W'(300);
  localparam logic [RESP_W-1:0] HARRIS_RESET = RESP_W'(1000000);

  logic [31:0] thr_lo;
  logic [3:0]  thr_hi;
  logic        do_write, do_read;

  assign do_write = awvalid && wvalid && !bvalid;
  assign do_read  = arvalid && !rvalid;
  assign awready  = do_write;
  assign wready   = do_write;
  assign arready  = do_read;
  assign bresp    = 2'b00;
  assign rresp    = 2'b00;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      edge_thr <= EDGE_RESET;
      thr_lo   <= HARRIS_RESET[31:0];
      thr_hi   <= HARRIS_RESET[RESP_W-1:32];
      bvalid   <= 1'b0;
      rvalid   <= 1'b0;
      rdata    <= '0;
    end else begin
      if (bvalid && bready) bvalid <= 1'b0;
      if (rvalid && rready) rvalid <= 1'b0;
      if (do_write) begin
        bvalid <= 1'b1;
        case (awaddr[3:2])
          2'd0: edge_thr <= MAG_W'(merge(32'(edge_thr), wdata, wstrb));
          2'd1: thr_lo   <= merge(thr_lo, wdata, wstrb);
          2'd2: thr_hi   <= 4'(merge(32'(thr_hi), wdata, wstrb));
          default: ;
        endcase
      end
      if (do_read) begin
        rvalid <= 1'b1;
        case (araddr[3:2])
          2'd0:    rdata <= 32'(edge_thr);
          2'd1:    rdata <= thr_lo;
          2'd2:    rdata <= 32'(thr_hi);
          default: rdata <= {23'd0, overrun, led};
        endcase
      end
    end
  end

  assign harris_thr = {thr_hi, thr_lo};

`ifndef SYNTHESIS
  // AXI rule: a response, once offered, is held until it is taken.
  logic bvalid_q, rvalid_q, bready_q, rready_q;
  logic [31:0] rdata_q;
  always_ff @(posedge clk) begin
    bvalid_q <= bvalid; rvalid_q <= rvalid; bready_q <= bready; rready_q <= rready;
    rdata_q  <= rdata;
    if (!rst && bvalid_q && !bready_q)
      assert (bvalid) else $error("filter_regs: BVALID dropped before BREADY");
    if (!rst && rvalid_q && !rready_q)
      assert (rvalid && rdata == rdata_q) else $error("filter_regs: read response changed before RREADY");
  end
`endif
endmodule
