// line_mem: one line of pixel storage, DEPTH words of W bits, indexed by the
// column. Synchronous write, asynchronous read: a read and a write to the same
// address in one cycle return the old word, which is what a line delay needs
// (read the pixel one line above, then overwrite it with the current one).
// Contents are not reset; users mask what has not been written in the frame.
// Infrastructure of this implementation (maps to block or distributed RAM).
module line_mem #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1280,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
