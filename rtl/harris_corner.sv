// harris_corner: Harris corner measure and corner decision on gradient streams.
//
// For every pixel the structure tensor
//     M = sum_(u,v) w(u,v) [ Ix^2   IxIy ]
//                          [ IxIy   Iy^2 ]
// is accumulated over a 3x3 window with the binomial weights
// w = [1 2 1; 2 4 2; 1 2 1] / 16, and the corner response
//     R = det(M) - k * trace(M)^2,   k = K_NUM / 2^K_SHIFT (41/1024 ~ 0.04)
// is compared with the signed threshold thr: corner = (R > thr).
// Gradients are first scaled down by 2^GRAD_SHIFT (arithmetic shift) so the
// products fit 2*(GRAD_W-GRAD_SHIFT) bits; window sums are divided by 16 with
// an arithmetic shift. R is computed exactly at these widths and returned on
// resp (RESP_W bits, enough for the default parameters without overflow).
//
// Pipeline: products (1) | 3x3 product window (1) | weighted sums (1) |
// A*B, C*C, A+B (1) | det, trace^2 (1) | R (1) | compare (1) = 7 clocks.
// The window shifts the image by one more line and pixel: the output at
// stream position (r, c) belongs to gradient position (r-1, c-1).
// The structure tensor M and a corner criterion computed from it follow the
// original system; the det - k*trace^2 form, the binomial window, k, the
// gradient pre-shift and the pipeline split are choices of this implementation.
module harris_corner
  import pixel_stream_pkg::*;
#(
  parameter int unsigned LINE_LEN   = ACTIVE_PIXELS,
  parameter int unsigned GRAD_SHIFT = 3,
  parameter int unsigned K_NUM      = 41,
  parameter int unsigned K_SHIFT    = 10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [GRAD_W-1:0] gx,
  input  logic signed [GRAD_W-1:0] gy,
  input  pix_ctrl_t                in_ctrl,
  input  logic signed [RESP_W-1:0] thr,
  output logic                     corner,
  output logic signed [RESP_W-1:0] resp,
  output pix_ctrl_t                out_ctrl
);
  localparam int unsigned IX_W   = GRAD_W - GRAD_SHIFT;
  localparam int unsigned PROD_W = 2 * IX_W;
  localparam int unsigned SUM_W  = PROD_W + 4;      // weighted sum before /16
  localparam int unsigned T_W    = PROD_W + 1;      // A, B, C after /16
  localparam int unsigned DET_W  = 2 * T_W + 2;
  localparam int unsigned KT_W   = 2 * (T_W + 1) + 8 + $clog2(K_NUM + 1);

  typedef struct packed {
    logic signed [PROD_W-1:0] xx;
    logic signed [PROD_W-1:0] yy;
    logic signed [PROD_W-1:0] xy;
  } prod_t;

  // Stage 1: scaled gradients and their products.
  logic signed [IX_W-1:0] ix, iy;
  prod_t     p1;
  pix_ctrl_t c1;
  assign ix = IX_W'(gx >>> GRAD_SHIFT);
  assign iy = IX_W'(gy >>> GRAD_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      p1 <= '0;
      c1 <= CTRL_IDLE;
    end else begin
      p1.xx <= ix * ix;
      p1.yy <= iy * iy;
      p1.xy <= ix * iy;
      c1    <= in_ctrl;
    end
  end

  // Stage 2: 3x3 window of the products.
  logic [$bits(prod_t)-1:0] w [3][3];
  pix_ctrl_t c2;
  window_gen #(.W($bits(prod_t)), .K(3), .LINE_LEN(LINE_LEN)) u_win (
    .clk, .rst, .in_data(p1), .in_ctrl(c1), .win(w), .out_ctrl(c2)
  );

  // Stage 3: binomial weighted sums, divided by 16.
  logic signed [SUM_W-1:0] sxx, syy, sxy;
  always_comb begin
    prod_t q;
    int unsigned wt;
    sxx = '0; syy = '0; sxy = '0;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        q  = prod_t'(w[i][j]);
        wt = (i == 1 ? 2 : 1) * (j == 1 ? 2 : 1);
        sxx += SUM_W'(q.xx) * SUM_W'(wt);
        syy += SUM_W'(q.yy) * SUM_W'(wt);
        sxy += SUM_W'(q.xy) * SUM_W'(wt);
      end
    end
  end

  logic signed [T_W-1:0] a3, b3, c3v;
  pix_ctrl_t c3;
  always_ff @(posedge clk) begin
    if (rst) begin
      a3 <= '0; b3 <= '0; c3v <= '0;
      c3 <= CTRL_IDLE;
    end else begin
      a3  <= T_W'(sxx >>> 4);
      b3  <= T_W'(syy >>> 4);
      c3v <= T_W'(sxy >>> 4);
      c3  <= c2;
    end
  end

  // Stage 4: A*B, C^2, trace.
  logic signed [DET_W-1:0] ab4, cc4;
  logic signed [T_W:0]     tr4;
  pix_ctrl_t c4;
  always_ff @(posedge clk) begin
    if (rst) begin
      ab4 <= '0; cc4 <= '0; tr4 <= '0;
      c4  <= CTRL_IDLE;
    end else begin
      ab4 <= DET_W'(a3) * DET_W'(b3);
      cc4 <= DET_W'(c3v) * DET_W'(c3v);
      tr4 <= (T_W+1)'(a3) + (T_W+1)'(b3);
      c4  <= c3;
    end
  end

  // Stage 5: det(M), trace(M)^2.
  logic signed [DET_W-1:0] det5;
  logic signed [KT_W-1:0]  trsq5;
  pix_ctrl_t c5;
  always_ff @(posedge clk) begin
    if (rst) begin
      det5 <= '0; trsq5 <= '0;
      c5   <= CTRL_IDLE;
    end else begin
      det5  <= ab4 - cc4;
      trsq5 <= KT_W'(tr4) * KT_W'(tr4);
      c5    <= c4;
    end
  end

  // Stage 6: R = det - k * trace^2.
  logic signed [KT_W-1:0] ktr;
  logic signed [KT_W:0]   r_full;
  logic signed [RESP_W-1:0] r6;
  pix_ctrl_t c6;
  assign ktr    = (trsq5 * KT_W'(K_NUM)) >>> K_SHIFT;
  assign r_full = (KT_W+1)'(det5) - (KT_W+1)'(ktr);
  always_ff @(posedge clk) begin
    if (rst) begin
      r6 <= '0;
      c6 <= CTRL_IDLE;
    end else begin
      r6 <= RESP_W'(r_full);
      c6 <= c5;
    end
  end

  // Stage 7: threshold.
  always_ff @(posedge clk) begin
    if (rst) begin
      corner   <= 1'b0;
      resp     <= '0;
      out_ctrl <= CTRL_IDLE;
    end else begin
      corner   <= r6 > thr;
      resp     <= r6;
      out_ctrl <= c6;
    end
  end
endmodule
