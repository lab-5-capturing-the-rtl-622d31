// lab5_pkg: types and video-format constants shared by the NTSC-to-SVGA design.
//
// The two display formats are the 640x480@60 test format (25 MHz pixel clock,
// 800 x 520 total) and the 720x480@60 format used for live video (27 MHz pixel
// clock, 858 x 525 total). The per-format counts below are the ones the design is
// specified with; svga_timing takes them as parameters so that one module serves
// both formats. The 10-bit YCrCb sample width matches the conversion equations
// (offsets 64 and 512, legal ranges 64..940 and 64..960), which are 10-bit values.
package lab5_pkg;

  // Sample width of the BT.656 stream and of the 4:4:4 components.
  localparam int unsigned YC_W = 10;

  // 640 x 480 @ 60 Hz (Part A test pattern)
  localparam int unsigned VGA_H_ACTIVE      = 640;
  localparam int unsigned VGA_H_FRONT_PORCH = 16;
  localparam int unsigned VGA_H_SYNCH       = 96;
  localparam int unsigned VGA_H_BACK_PORCH  = 48;
  localparam int unsigned VGA_H_TOTAL       = 800;
  localparam int unsigned VGA_V_ACTIVE      = 480;
  localparam int unsigned VGA_V_FRONT_PORCH = 9;
  localparam int unsigned VGA_V_SYNCH       = 2;
  localparam int unsigned VGA_V_BACK_PORCH  = 29;
  localparam int unsigned VGA_V_TOTAL       = 520;

  // 720 x 480 @ 60 Hz (live video, pixel clock = LLC = 27 MHz)
  localparam int unsigned TV_H_ACTIVE      = 720;
  localparam int unsigned TV_H_FRONT_PORCH = 7;
  localparam int unsigned TV_H_SYNCH       = 62;
  localparam int unsigned TV_H_BACK_PORCH  = 69;
  localparam int unsigned TV_H_TOTAL       = 858;
  localparam int unsigned TV_V_ACTIVE      = 487;
  localparam int unsigned TV_V_FRONT_PORCH = 4;
  localparam int unsigned TV_V_SYNCH       = 4;
  localparam int unsigned TV_V_BACK_PORCH  = 30;
  localparam int unsigned TV_V_TOTAL       = 525;

  // Line start offset loaded into the line counter on reset: V_TOTAL - 33.
  localparam int unsigned V_RESET_OFFSET = 33;

  typedef logic [YC_W-1:0] yc_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    yc_t y;
    yc_t cb;
    yc_t cr;
  } ycc_t;

  // Timing flags decoded from the XY word of a timing reference signal.
  typedef struct packed {
    logic f;  // 0 = field 1 (odd), 1 = field 2 (even)
    logic v;  // 1 = field (vertical) blanking
    logic h;  // 0 = SAV, 1 = EAV (horizontal blanking)
  } hvf_t;

  // Outputs of the SVGA timing generator (all active high).
  typedef struct packed {
    logic hsync;
    logic vsync;
    logic blank;
    logic csync;
  } svga_sync_t;

endpackage
