// line_buffer: one video line of 24-bit RGB held in block RAM.
//
// A simple dual-port memory: one write port and one read port on the same clock.
// The write side stores rgb at waddr when we is high; the read side returns the
// word at raddr one clock later (registered read, as a block RAM does). Two of
// these form the ping-pong pair of the line doubler: one is filled with the
// incoming line while the other is read out. The depth of 1024 words holds a whole
// 858-sample line of the 720x480 format, blanking included; the depth and the
// registered read are this design's choices.
module line_buffer
  import lab5_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  rgb_t          wdata,
  input  logic [AW-1:0] raddr,
  output rgb_t          rdata
);

  rgb_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
