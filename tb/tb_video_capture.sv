// tb_video_capture: end-to-end testbench of the live-video path at full size.
// A BT.656 source sends the 720x480 NTSC test image (1716 words per line, 525
// lines) on a 27 MHz clock for a little over two camera frames. The output is
// checked by video_out_checker (sync timing, every displayed line against the
// floating-point model, line doubling). Also counted, and required at least once:
// field-edge restarts of the display timing (one per camera frame, 900900 clocks
// apart), line-buffer swaps (one per camera line), input limiting and output
// saturation in the converter, lines of both fields on the screen, and the
// constant decoder control pins.
module tb_video_capture;
  logic llc = 0, locked = 0, run = 0;
  logic [9:0] ycc;
  int line, word;
  logic pclk, hs_z, vs_z, bl_z, cs, rst_vdec_z, oe_z, pwrdn_z, field, restart;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;
  int restarts = 0, last_restart = -1, swaps = 0, limited = 0, saturated = 0, cyc = 0, pclk_bad = 0;
  always #18.518 llc = ~llc;

  bt656_source src (.clk(llc), .run, .data(ycc), .line, .word);
  video_capture dut (.llc_clock(llc), .system_dcm_locked(locked), .ycrcb_in(ycc), .pixel_clock(pclk),
    .h_sync_z(hs_z), .v_sync_z(vs_z), .blank_z(bl_z), .comp_sync(cs), .r, .g, .b,
    .reset_vdec1_z(rst_vdec_z), .vdec1_oe_z(oe_z), .vdec1_pwrdn_z(pwrdn_z), .field, .frame_restart(restart));
  video_out_checker chk (.clk(llc), .enable(restarts > 0), .restart(restart), .h_sync_z(hs_z), .v_sync_z(vs_z), .blank_z(bl_z), .r, .g, .b);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge llc) if (locked) begin
    cyc++;
    if (restart) begin
      if (last_restart >= 0) check(cyc - last_restart == 900900, $sformatf("restart period %0d", cyc - last_restart));
      last_restart = cyc; restarts++;
      // the pulse holds the display timing in reset: counters at their reset position
      check(dut.pixel_count == 0 && dut.line_count == lab5_pkg::TV_V_TOTAL - lab5_pkg::V_RESET_OFFSET,
            $sformatf("display counters %0d/%0d during restart", dut.pixel_count, dut.line_count));
    end
    swaps += dut.line_swap;
    if (dut.pix_en && (dut.y444 < 64 || dut.y444 > 940 || dut.cb444 < 64 || dut.cb444 > 960 || dut.cr444 < 64 || dut.cr444 > 960)) limited++;
    if (dut.rgb_en && !dut.rgb_sb[1] && (dut.rgb_w.r == 0 || dut.rgb_w.r == 255 || dut.rgb_w.b == 0 || dut.rgb_w.b == 255)) saturated++;
  end
  // the forwarded pixel clock is the inverse of LLC
  always @(posedge llc) #5 if (pclk !== 1'b0) pclk_bad++;
  always @(negedge llc) #5 if (pclk !== 1'b1) pclk_bad++;

  initial begin
    #90ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures); $finish;
  end

  initial begin
    repeat (4) @(posedge llc);
    @(negedge llc) begin locked = 1; run = 1; end
    repeat (2 * 900900 + 20000) @(posedge llc);
    check(restarts == 3, $sformatf("%0d field-edge restarts", restarts));
    check(swaps > 2 * 525, $sformatf("%0d line-buffer swaps", swaps));
    check(limited > 0 && saturated > 0, $sformatf("limiting %0d, saturation %0d", limited, saturated));
    check(chk.frames >= 3, $sformatf("%0d display frames checked", chk.frames));
    check(chk.odd_lines > 400 && chk.even_lines > 400, $sformatf("odd-field lines %0d, even-field lines %0d", chk.odd_lines, chk.even_lines));
    check(chk.doubled > 400, $sformatf("%0d doubled lines", chk.doubled));
    check(pclk_bad == 0, $sformatf("pixel clock wrong %0d times", pclk_bad));
    check(rst_vdec_z && !oe_z && pwrdn_z && !cs, "decoder control pins and comp sync");
    $display("restarts %0d swaps %0d limited %0d saturated %0d frames %0d picture lines %0d black %0d doubled %0d odd %0d even %0d",
             restarts, swaps, limited, saturated, chk.frames, chk.pic_lines, chk.black_lines, chk.doubled, chk.odd_lines, chk.even_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
