// video_capture: live NTSC camera video to a 720x480@60 progressive SVGA display.
//
// The video decoder delivers ITU-R BT.656: interlaced YCrCb 4:2:2 words at 27 MHz
// on its line-locked clock LLC, with timing reference codes marking each line.
// This module runs entirely on LLC and passes the video through these stages:
//   extract_hvf      finds the timing codes, yields F, V, H and a delayed stream
//   c422_444         splits Cb Y Cr Y and repeats chroma: 4:4:4 pixels at 13.5 MHz
//   ycrcb2rgb        converts to 24-bit RGB with range limiting and saturation
//   buffer_control + two line_buffers
//                    write each camera line into one buffer while the other is
//                    read at 27 MHz, so every line is shown twice (line doubling)
//   neg_edge_detect  pulses when F falls (start of the odd field); the pulse,
//                    together with the system reset, restarts svga_timing
//   svga_timing      720x480 raster, 858 x 525 clocks at 27 MHz
//   pipe_line_delay  one-clock delay of sync/blank to match the buffer read
//   oddr_clock_out   forwards the pixel clock to the DAC through a DDR flop
// Because the display's pixel clock equals LLC and a camera line lasts exactly two
// display lines, one camera frame (two fields) lasts two display frames, and the
// raster stays in step once restarted by the field edge. The display pixel counter
// is the line-buffer read address.
//
// Interface: system_dcm_locked is the active-low reset (low holds everything in
// reset). Sync and blank pins are active low. The decoder control pins are held at
// constant values: out of reset, outputs enabled, powered up. The block structure,
// the clock rates and the field-edge restart follow the lab specification; the
// pin polarities, the constant pin values, the inverted forwarded pixel clock
// (the DAC samples in the middle of each pixel) and the 10-bit input are this
// design's choices.
module video_capture
  import lab5_pkg::*;
#(
  parameter int unsigned DATA_W   = YC_W,
  parameter int unsigned LB_DEPTH = 1024
) (
  input  logic              llc_clock,
  input  logic              system_dcm_locked,
  input  logic [DATA_W-1:0] ycrcb_in,
  // SVGA video DAC
  output logic              pixel_clock,
  output logic              h_sync_z,
  output logic              v_sync_z,
  output logic              blank_z,
  output logic              comp_sync,
  output logic [7:0]        r,
  output logic [7:0]        g,
  output logic [7:0]        b,
  // video decoder control
  output logic              reset_vdec1_z,
  output logic              vdec1_oe_z,
  output logic              vdec1_pwrdn_z,
  // status
  output logic              field,
  output logic              frame_restart
);

  localparam int unsigned AW   = $clog2(LB_DEPTH);
  localparam int unsigned HC_W = $clog2(TV_H_TOTAL);
  localparam int unsigned VC_W = $clog2(TV_V_TOTAL);

  logic              rst_n;
  logic              svga_rst_n;

  // timing extraction
  logic [DATA_W-1:0] ycc_d;
  logic              f_x, v_x, h_x, trs_seen;

  // 4:4:4
  logic [DATA_W-1:0] y444, cb444, cr444;
  logic              pix_en, clk_13m5, fo, ho, vo;

  // RGB
  rgb_t              rgb_w;
  logic              rgb_en;
  logic [2:0]        rgb_sb;

  // line buffers
  logic [1:0]        buf_we;
  logic [AW-1:0]     buf_waddr, buf_raddr;
  rgb_t              buf_wdata;
  rgb_t              buf_rdata [2];
  rgb_t              rgb_rd;
  logic              wr_sel, line_swap;

  // display timing
  logic              one_shot;
  logic [HC_W-1:0]   pixel_count;
  logic [VC_W-1:0]   line_count;
  logic              hblank, vblank, hsync, vsync, blank, csync;
  svga_sync_t        sync_now, sync_dly;
  logic              hblank_start;

  assign rst_n = system_dcm_locked;

  extract_hvf #(.DATA_W(DATA_W)) u_extract (
    .clk      (llc_clock),
    .rst_n    (rst_n),
    .ycrcb_in (ycrcb_in),
    .ycrcb_out(ycc_d),
    .f_out    (f_x),
    .v_out    (v_x),
    .h_out    (h_x),
    .trs_seen (trs_seen)
  );

  c422_444 #(.DATA_W(DATA_W)) u_444 (
    .clk     (llc_clock),
    .rst_n   (rst_n),
    .ycrcb_in(ycc_d),
    .f_in    (f_x),
    .h_in    (h_x),
    .v_in    (v_x),
    .y_out   (y444),
    .cb_out  (cb444),
    .cr_out  (cr444),
    .pix_en  (pix_en),
    .clk_out (clk_13m5),
    .fo      (fo),
    .ho      (ho),
    .vo      (vo)
  );

  ycrcb2rgb #(.DATA_W(DATA_W)) u_rgb (
    .clk   (llc_clock),
    .rst_n (rst_n),
    .en    (pix_en),
    .y     (y444),
    .cb    (cb444),
    .cr    (cr444),
    .sb_in ({ho, vo, fo}),
    .rgb   (rgb_w),
    .out_en(rgb_en),
    .sb_out(rgb_sb)
  );

  buffer_control #(.DEPTH(LB_DEPTH)) u_bufctl (
    .clk      (llc_clock),
    .rst_n    (rst_n),
    .wr_en    (rgb_en),
    .wr_h     (rgb_sb[2]),
    .wr_rgb   (rgb_w),
    .buf_we   (buf_we),
    .buf_waddr(buf_waddr),
    .buf_wdata(buf_wdata),
    .buf_raddr(buf_raddr),
    .buf_rdata(buf_rdata),
    .rd_addr  (AW'(pixel_count)),
    .rd_hblank_start(hblank_start),
    .rd_rgb   (rgb_rd),
    .wr_sel   (wr_sel),
    .line_swap(line_swap)
  );

  for (genvar i = 0; i < 2; i++) begin : g_lb
    line_buffer #(.DEPTH(LB_DEPTH)) u_lb (
      .clk  (llc_clock),
      .we   (buf_we[i]),
      .waddr(buf_waddr),
      .wdata(buf_wdata),
      .raddr(buf_raddr),
      .rdata(buf_rdata[i])
    );
  end

  neg_edge_detect u_field_edge (
    .clk         (llc_clock),
    .rst_n       (rst_n),
    .sig_in      (f_x),
    .one_shot_out(one_shot)
  );

  // The field-edge pulse is a register output, so this reset is glitch free.
  assign svga_rst_n = rst_n & ~one_shot;

  svga_timing #(
    .H_ACTIVE     (TV_H_ACTIVE),
    .H_FRONT_PORCH(TV_H_FRONT_PORCH),
    .H_SYNCH      (TV_H_SYNCH),
    .H_BACK_PORCH (TV_H_BACK_PORCH),
    .H_TOTAL      (TV_H_TOTAL),
    .V_ACTIVE     (TV_V_ACTIVE),
    .V_FRONT_PORCH(TV_V_FRONT_PORCH),
    .V_SYNCH      (TV_V_SYNCH),
    .V_BACK_PORCH (TV_V_BACK_PORCH),
    .V_TOTAL      (TV_V_TOTAL)
  ) u_timing (
    .clk           (llc_clock),
    .rst_n         (svga_rst_n),
    .pix_en        (1'b1),
    .pixel_count   (pixel_count),
    .line_count    (line_count),
    .horiz_blank   (hblank),
    .vertical_blank(vblank),
    .horiz_sync    (hsync),
    .vertical_sync (vsync),
    .blank         (blank),
    .comp_sync     (csync)
  );

  assign hblank_start = (pixel_count == HC_W'(TV_H_ACTIVE));

  assign sync_now = '{hsync: hsync, vsync: vsync, blank: blank, csync: csync};

  pipe_line_delay #(.WIDTH($bits(svga_sync_t))) u_delay (
    .clk  (llc_clock),
    .rst_n(rst_n),
    .d_in (sync_now),
    .d_out(sync_dly)
  );

  oddr_clock_out u_pclk (
    .C0(llc_clock),
    .C1(~llc_clock),
    .CE(1'b1),
    .D0(1'b0),
    .D1(1'b1),
    .R (1'b0),
    .S (1'b0),
    .Q (pixel_clock)
  );

  assign h_sync_z  = ~sync_dly.hsync;
  assign v_sync_z  = ~sync_dly.vsync;
  assign blank_z   = ~sync_dly.blank;
  assign comp_sync = sync_dly.csync;
  assign r = rgb_rd.r;
  assign g = rgb_rd.g;
  assign b = rgb_rd.b;

  assign reset_vdec1_z = 1'b1;
  assign vdec1_oe_z    = 1'b0;
  assign vdec1_pwrdn_z = 1'b1;

  assign field         = f_x;
  assign frame_restart = one_shot;

endmodule
