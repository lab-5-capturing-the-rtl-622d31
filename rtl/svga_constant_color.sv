// svga_constant_color: 640x480@60 SVGA test generator showing one constant colour.
//
// The 100 MHz system clock is divided by four to give the 25 MHz pixel rate: a
// two-bit counter produces a one-in-four pixel enable for the timing generator,
// and its upper bit is the 25 MHz PIXEL_CLOCK sent to the video DAC. svga_timing
// runs with the 640x480 counts (800 pixels x 520 lines), so 100e6/4/(800*520) is
// about 60 frames per second. R, G and B carry the constant COLOR. The sync and
// blank pins are active low, as their _Z names say (the timing generator's flags
// are active high); COMP_SYNC is held at zero.
// Reset sys_rst_n is asynchronous and active low. The division by four, the
// format and the constant colour follow the lab specification; the colour value
// and the pin polarities are this design's.
module svga_constant_color
  import lab5_pkg::*;
#(
  parameter rgb_t COLOR = '{r: 8'd0, g: 8'd128, b: 8'd255}
) (
  input  logic       sys_clk,
  input  logic       sys_rst_n,
  output logic       pixel_clock,
  output logic       h_sync_z,
  output logic       v_sync_z,
  output logic       blank_z,
  output logic       comp_sync,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);

  logic [1:0] div_q;
  logic       pix_en;
  logic       hsync, vsync, blank, csync;
  logic       hblank, vblank;
  logic [$clog2(VGA_H_TOTAL)-1:0] pixel_count;
  logic [$clog2(VGA_V_TOTAL)-1:0] line_count;

  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n) div_q <= '0;
    else            div_q <= div_q + 2'd1;
  end

  assign pix_en      = (div_q == 2'd3);
  assign pixel_clock = div_q[1];

  svga_timing #(
    .H_ACTIVE     (VGA_H_ACTIVE),
    .H_FRONT_PORCH(VGA_H_FRONT_PORCH),
    .H_SYNCH      (VGA_H_SYNCH),
    .H_BACK_PORCH (VGA_H_BACK_PORCH),
    .H_TOTAL      (VGA_H_TOTAL),
    .V_ACTIVE     (VGA_V_ACTIVE),
    .V_FRONT_PORCH(VGA_V_FRONT_PORCH),
    .V_SYNCH      (VGA_V_SYNCH),
    .V_BACK_PORCH (VGA_V_BACK_PORCH),
    .V_TOTAL      (VGA_V_TOTAL)
  ) u_timing (
    .clk           (sys_clk),
    .rst_n         (sys_rst_n),
    .pix_en        (pix_en),
    .pixel_count   (pixel_count),
    .line_count    (line_count),
    .horiz_blank   (hblank),
    .vertical_blank(vblank),
    .horiz_sync    (hsync),
    .vertical_sync (vsync),
    .blank         (blank),
    .comp_sync     (csync)
  );

  assign h_sync_z  = ~hsync;
  assign v_sync_z  = ~vsync;
  assign blank_z   = ~blank;
  assign comp_sync = csync;
  assign r = COLOR.r;
  assign g = COLOR.g;
  assign b = COLOR.b;

endmodule
