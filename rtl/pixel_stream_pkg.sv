// pixel_stream_pkg: types and constants shared by the streaming video pipeline.
//
// Pixels travel one per clock on a "streaming pixel" bus: a data word plus a
// control word. The control word marks the first and last pixel of a line
// (hStart/hEnd), the first and last pixel of a frame (vStart/vEnd) and whether
// the cycle carries a pixel at all (valid). valid may drop inside a line and
// between lines (blanking); every block simply carries the control word along
// with its data so the frame structure survives any fixed pipeline latency.
//
// The latencies of all blocks are collected here so the top level can align
// its parallel paths. The image size defaults to the 1280x1024 camera frame.
// The data-plus-control pixel stream and the 1280x1024 frame follow the
// original system; the latencies are those of this implementation.
package pixel_stream_pkg;

  typedef struct packed {
    logic hStart;
    logic hEnd;
    logic vStart;
    logic vEnd;
    logic valid;
  } pix_ctrl_t;

  localparam pix_ctrl_t CTRL_IDLE = '0;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Active filters selected by the board switches (bit 0 = lowest switch).
  typedef struct packed {
    logic sharpen;  // sw[4]
    logic median;   // sw[3]
    logic corner;   // sw[2] Harris corner overlay
    logic sobel;    // sw[1] Sobel edge map
    logic gray;     // sw[0] grey output
  } filt_en_t;

  localparam int unsigned ACTIVE_PIXELS = 1280;  // camera line length
  localparam int unsigned ACTIVE_LINES  = 1024;  // camera frame height

  localparam int unsigned PIX_W  = 8;   // intensity width
  localparam int unsigned GRAD_W = 11;  // signed Sobel gradient, |g| <= 1020
  localparam int unsigned MAG_W  = 11;  // |gx|+|gy| <= 2040
  localparam int unsigned RESP_W = 36;  // signed Harris response

  // Block latencies in clock cycles (input control to output control).
  localparam int unsigned LAT_GRAY    = 2;
  localparam int unsigned LAT_WINDOW  = 1;
  localparam int unsigned LAT_SOBEL   = LAT_WINDOW + 1;
  localparam int unsigned LAT_EDGE    = 1;
  localparam int unsigned LAT_HARRIS  = 1 + LAT_WINDOW + 1 + 4;
  localparam int unsigned LAT_MEDIAN  = LAT_WINDOW + 1;
  localparam int unsigned LAT_SHARPEN = LAT_WINDOW + 1;
  localparam int unsigned LAT_LDELAY  = 1;

  localparam int unsigned LAT_IP1_Y      = LAT_GRAY + LAT_SOBEL + LAT_EDGE;    // 5
  localparam int unsigned LAT_IP1_CORNER = LAT_GRAY + LAT_SOBEL + LAT_HARRIS;  // 11
  localparam int unsigned LAT_IP2        = LAT_MEDIAN + LAT_SHARPEN;           // 4
  // Top: intensity path and corner path meet after one extra line delay on
  // the corner flag; one output register follows.
  localparam int unsigned LAT_ALIGN = LAT_IP1_CORNER + LAT_LDELAY;             // 12
  localparam int unsigned LAT_TOP   = LAT_ALIGN + 1;                           // 13

endpackage
