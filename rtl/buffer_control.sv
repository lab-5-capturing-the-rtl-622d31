// buffer_control: ping-pong control of the two line buffers (line doubler).
//
// Camera lines arrive as 13.5 MHz pixels (one per wr_en) and take 1716 clocks of
// the 27 MHz clock; the display reads 27 MHz pixels and needs 858 clocks per line.
// Two line buffers are used alternately: while one is written with the incoming
// line, the other, holding the previous line, is read, and since a line is read in
// half the time it takes to write one, each camera line is shown twice. This
// de-interlaces a field into a full progressive frame by line doubling.
//
// Write side: at the start of horizontal blanking (wr_h rising from 0 to 1) the
// roles of the buffers swap and the write address returns to zero; every wr_en
// writes wr_rgb at the current address and advances it (it stops at the last
// word). The pixel seen together with the H edge is the first one stored in the
// new buffer. The write address therefore counts whole lines, blanking included.
// Read side: the display pixel counter rd_addr, plus RD_OFFSET, addresses the
// buffer that is not being written. RD_OFFSET is the number of pixel slots
// stored ahead of the first active pixel, so that display pixel 0 shows camera
// pixel 0: EAV, 268 blanking words and SAV span 138 two-word slots, and the H edge
// reaches this block with the second of them, which leaves 137. The read side takes over the new buffer select only at rd_hblank_start, the
// start of the display's horizontal blanking, so a displayed line never changes
// buffer part way through. A display line that starts before the swap keeps
// reading the old buffer while its start is overwritten; the reader is always
// ahead of the writer (it moves twice as fast and starts RD_OFFSET words ahead),
// so it still sees the old line. rd_rgb is the word read one clock after rd_addr.
// The swap point, the address reset and the read/write alternation follow the lab
// specification; the read offset, the display-aligned read select, the saturating
// write address and the exact first-pixel rule are this design's.
// Reset asynchronous, active low: buffer 0 is written first.
module buffer_control
  import lab5_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned RD_OFFSET = 137
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (4:4:4 RGB from the colour converter)
  input  logic          wr_en,
  input  logic          wr_h,
  input  rgb_t          wr_rgb,
  // the two line buffers
  output logic [1:0]    buf_we,
  output logic [AW-1:0] buf_waddr,
  output rgb_t          buf_wdata,
  output logic [AW-1:0] buf_raddr,
  input  rgb_t          buf_rdata [2],
  // read side (display)
  input  logic [AW-1:0] rd_addr,
  input  logic          rd_hblank_start,
  output rgb_t          rd_rgb,
  output logic          wr_sel,     // buffer being written
  output logic          line_swap   // high in the clock the buffers swap
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  logic          h_q;
  logic          sel_q;
  logic [AW-1:0] addr_q;
  logic [AW-1:0] addr_now;
  logic          rd_sel_q;   // buffer the display reads from
  logic          rd_sel_d;   // the same, aligned with the read latency

  always_comb begin
    line_swap = wr_h & ~h_q;
    wr_sel    = line_swap ? ~sel_q : sel_q;
    addr_now  = line_swap ? '0 : addr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q      <= 1'b0;
      sel_q    <= 1'b0;
      addr_q   <= '0;
      rd_sel_q <= 1'b1;
      rd_sel_d <= 1'b1;
    end else begin
      h_q      <= wr_h;
      sel_q    <= wr_sel;
      if (rd_hblank_start) rd_sel_q <= ~wr_sel;
      rd_sel_d <= rd_sel_q;
      if (wr_en && addr_now != LAST) addr_q <= addr_now + 1'b1;
      else                           addr_q <= addr_now;
    end
  end

  assign buf_we[0] = wr_en & ~wr_sel;
  assign buf_we[1] = wr_en &  wr_sel;
  assign buf_waddr = addr_now;
  assign buf_wdata = wr_rgb;
  assign buf_raddr = rd_addr + AW'(RD_OFFSET);
  assign rd_rgb    = buf_rdata[rd_sel_d];

endmodule
