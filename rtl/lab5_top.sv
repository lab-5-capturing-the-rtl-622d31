// lab5_top: the complete camera-to-monitor system and its SVGA test generator.
//
// Three parts sit side by side, each with its own ports:
//  * svga_constant_color (on the 100 MHz system clock): the 640x480@60 SVGA
//    timing check that shows one constant colour, used to bring up the monitor
//    path before any video is connected (ports a_*).
//  * video_capture (on the decoder's 27 MHz LLC clock): live BT.656 camera video,
//    decoded, converted to RGB, line-doubled through two line buffers and shown as
//    720x480@60 progressive SVGA (ports v_*).
//  * decoder_config (on the system clock): writes the decoder's composite-video
//    register set over I2C after reset (ports i2c_*, cfg_*).
// The video decoder, the video DAC and the monitor are external parts; their
// signals are the ports here. The I2C lines are open drain: *_low high pulls the
// line low, and i2c_sda_in is the bus level. Both resets are active low.
module lab5_top
  import lab5_pkg::*;
(
  // system clock and reset
  input  logic            sys_clk,
  input  logic            sys_rst_n,
  // SVGA test generator
  output logic            a_pixel_clock,
  output logic            a_h_sync_z,
  output logic            a_v_sync_z,
  output logic            a_blank_z,
  output logic            a_comp_sync,
  output logic [7:0]      a_r,
  output logic [7:0]      a_g,
  output logic [7:0]      a_b,
  // video decoder data and clock
  input  logic            llc_clock,
  input  logic            system_dcm_locked,
  input  logic [YC_W-1:0] ycrcb_in,
  // live video to the SVGA DAC
  output logic            v_pixel_clock,
  output logic            v_h_sync_z,
  output logic            v_v_sync_z,
  output logic            v_blank_z,
  output logic            v_comp_sync,
  output logic [7:0]      v_r,
  output logic [7:0]      v_g,
  output logic [7:0]      v_b,
  output logic            reset_vdec1_z,
  output logic            vdec1_oe_z,
  output logic            vdec1_pwrdn_z,
  output logic            v_field,
  output logic            v_frame_restart,
  // decoder configuration over I2C
  output logic            i2c_scl_low,
  output logic            i2c_sda_low,
  input  logic            i2c_sda_in,
  input  logic            cfg_go,
  output logic            cfg_done,
  output logic            cfg_error,
  output logic [4:0]      cfg_err_index
);

  svga_constant_color u_part_a (
    .sys_clk    (sys_clk),
    .sys_rst_n  (sys_rst_n),
    .pixel_clock(a_pixel_clock),
    .h_sync_z   (a_h_sync_z),
    .v_sync_z   (a_v_sync_z),
    .blank_z    (a_blank_z),
    .comp_sync  (a_comp_sync),
    .r          (a_r),
    .g          (a_g),
    .b          (a_b)
  );

  video_capture u_video (
    .llc_clock        (llc_clock),
    .system_dcm_locked(system_dcm_locked),
    .ycrcb_in         (ycrcb_in),
    .pixel_clock      (v_pixel_clock),
    .h_sync_z         (v_h_sync_z),
    .v_sync_z         (v_v_sync_z),
    .blank_z          (v_blank_z),
    .comp_sync        (v_comp_sync),
    .r                (v_r),
    .g                (v_g),
    .b                (v_b),
    .reset_vdec1_z    (reset_vdec1_z),
    .vdec1_oe_z       (vdec1_oe_z),
    .vdec1_pwrdn_z    (vdec1_pwrdn_z),
    .field            (v_field),
    .frame_restart    (v_frame_restart)
  );

  decoder_config u_config (
    .clk      (sys_clk),
    .rst_n    (sys_rst_n),
    .go       (cfg_go),
    .done     (cfg_done),
    .error    (cfg_error),
    .err_index(cfg_err_index),
    .scl_low  (i2c_scl_low),
    .sda_low  (i2c_sda_low),
    .sda_in   (i2c_sda_in)
  );

endmodule
