// tb_lab5_top: end-to-end testbench of the whole system at its default sizes.
// Clocks: 100 MHz system clock, 27 MHz decoder clock. Models: a BT.656 decoder
// output carrying the 720x480 NTSC test image, and an I2C slave for the decoder's
// register port. Runs a little over two camera frames and checks:
//  * live video: sync timing, every displayed line against the floating-point
//    colour model, line doubling (video_out_checker);
//  * the register configuration: the 19 writes arrive in order, then a rerun
//    with the slave refusing to acknowledge must abort with an error;
//  * the 640x480 test generator: line and frame periods and the constant colour.
// Every mechanism is counted and must occur: field-edge restarts, buffer swaps,
// line doubling, lines of both fields, input limiting, output saturation, timing
// reference codes, I2C writes, the NACK abort, and test-generator frames.
module tb_lab5_top;
  logic sys_clk = 0, sys_rst_n = 0, llc = 0, locked = 0, run = 0, cfg_go = 0, nack_req = 0;
  logic [9:0] ycc;
  int line, word;
  logic a_pclk, a_hs_z, a_vs_z, a_bl_z, a_cs;
  logic [7:0] a_r, a_g, a_b, v_r, v_g, v_b;
  logic v_pclk, v_hs_z, v_vs_z, v_bl_z, v_cs, rst_vdec_z, oe_z, pwrdn_z, v_field, v_restart;
  logic scl_low, sda_low, sda_pull, scl, sda, cfg_done, cfg_error;
  logic [4:0] cfg_err_index;
  int checks = 0, failures = 0;
  int restarts = 0, swaps = 0, limited = 0, saturated = 0, trs = 0;
  int a_hs_fall = -1, a_vs_fall = -1, a_frames = 0, a_lines = 0, scyc = 0;
  logic a_hs_q = 1, a_vs_q = 1;
  logic [15:0] exp_w [19] = '{16'h0004, 16'h1500, 16'h1741, 16'h2758, 16'h3a16,
                              16'h5004, 16'h0e80, 16'h5020, 16'h5218, 16'h58ed,
                              16'h77c5, 16'h7c93, 16'h7d00, 16'hd048, 16'hd5a0,
                              16'hd7ea, 16'he43e, 16'hea0f, 16'h0e00};

  always #5 sys_clk = ~sys_clk;
  always #18.518 llc = ~llc;

  bt656_source src (.clk(llc), .run, .data(ycc), .line, .word);

  lab5_top dut (
    .sys_clk, .sys_rst_n,
    .a_pixel_clock(a_pclk), .a_h_sync_z(a_hs_z), .a_v_sync_z(a_vs_z), .a_blank_z(a_bl_z),
    .a_comp_sync(a_cs), .a_r, .a_g, .a_b,
    .llc_clock(llc), .system_dcm_locked(locked), .ycrcb_in(ycc),
    .v_pixel_clock(v_pclk), .v_h_sync_z(v_hs_z), .v_v_sync_z(v_vs_z), .v_blank_z(v_bl_z),
    .v_comp_sync(v_cs), .v_r, .v_g, .v_b,
    .reset_vdec1_z(rst_vdec_z), .vdec1_oe_z(oe_z), .vdec1_pwrdn_z(pwrdn_z),
    .v_field, .v_frame_restart(v_restart),
    .i2c_scl_low(scl_low), .i2c_sda_low(sda_low), .i2c_sda_in(sda),
    .cfg_go, .cfg_done, .cfg_error, .cfg_err_index);

  assign scl = ~scl_low;
  assign sda = ~(sda_low | sda_pull);
  i2c_slave_model #(.ADDR(7'h20)) slave (.scl, .sda, .nack_req, .sda_pull);

  video_out_checker chk (.clk(llc), .enable(restarts > 0), .restart(v_restart),
    .h_sync_z(v_hs_z), .v_sync_z(v_vs_z), .blank_z(v_bl_z), .r(v_r), .g(v_g), .b(v_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters in the video path
  always @(posedge llc) if (locked) begin
    restarts += v_restart;
    swaps    += dut.u_video.line_swap;
    trs      += dut.u_video.trs_seen;
    if (dut.u_video.pix_en && (dut.u_video.y444 < 64 || dut.u_video.y444 > 940)) limited++;
    if (dut.u_video.rgb_en && (dut.u_video.rgb_w.g == 0 || dut.u_video.rgb_w.g == 255)) saturated++;
  end

  // 640x480 test generator
  always @(posedge sys_clk) if (sys_rst_n) begin
    scyc++;
    if (!a_hs_z && a_hs_q) begin
      if (a_hs_fall >= 0) check(scyc - a_hs_fall == 3200, "test generator line period");
      a_hs_fall = scyc; a_lines++;
    end
    if (!a_vs_z && a_vs_q) begin
      if (a_vs_fall >= 0) begin check(scyc - a_vs_fall == 3200 * 520, "test generator frame period"); a_frames++; end
      a_vs_fall = scyc;
    end
    if (a_bl_z && (a_r != 8'd0 || a_g != 8'd128 || a_b != 8'd255)) begin
      failures++; checks++;
      $display("FAIL: test generator colour");
    end
    a_hs_q = a_hs_z; a_vs_q = a_vs_z;
  end

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures); $finish;
  end

  initial begin
    fork
      begin
        repeat (4) @(posedge llc);
        @(negedge llc) begin locked = 1; run = 1; end
      end
      begin
        repeat (3) @(posedge sys_clk);
        @(negedge sys_clk) sys_rst_n = 1;
        slave.n_starts = 0; slave.n_stops = 0;
      end
    join
    // register configuration
    wait (cfg_done || cfg_error);
    check(cfg_done && !cfg_error, "configuration completes");
    check(slave.n_writes == 19, $sformatf("%0d register writes", slave.n_writes));
    for (int i = 0; i < 19; i++)
      check({slave.reg_log[i], slave.val_log[i]} == exp_w[i], $sformatf("register write %0d", i));
    @(negedge sys_clk) cfg_go = 1;
    @(negedge sys_clk) cfg_go = 0;
    wait (slave.n_writes == 21);
    nack_req = 1;
    wait (cfg_error);
    check(cfg_err_index == 5'd2 && slave.n_writes == 21, "NACK aborts the configuration at entry 2");
    // video
    wait (restarts == 3);
    repeat (20000) @(posedge llc);
    check(restarts == 3 && swaps > 2 * 525 && trs > 4 * 525, $sformatf("restarts %0d swaps %0d codes %0d", restarts, swaps, trs));
    check(chk.doubled > 400 && chk.odd_lines > 400 && chk.even_lines > 400,
          $sformatf("doubled %0d odd %0d even %0d", chk.doubled, chk.odd_lines, chk.even_lines));
    check(limited > 0 && saturated > 0, $sformatf("limiting %0d saturation %0d", limited, saturated));
    check(chk.frames >= 3 && a_frames >= 3, $sformatf("video frames %0d, test frames %0d", chk.frames, a_frames));
    check(chk.vsync_cut > 0, $sformatf("%0d vertical syncs shortened by a restart", chk.vsync_cut));
    check(rst_vdec_z && !oe_z && pwrdn_z && !v_cs && !a_cs, "constant control pins");
    $display("restarts %0d swaps %0d codes %0d limited %0d saturated %0d doubled %0d odd %0d even %0d vsync_cut %0d i2c writes %0d test frames %0d",
             restarts, swaps, trs, limited, saturated, chk.doubled, chk.odd_lines, chk.even_lines, chk.vsync_cut, slave.n_writes, a_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
