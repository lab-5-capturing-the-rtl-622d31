// tb_svga_timing: self-checking testbench for svga_timing.
// Two instances: the 720x480 format with the pixel enable always high, and the
// 640x480 format with a one-in-four enable (100 MHz clock divided by four).
// Checks the reset values (line counter V_TOTAL-33, vertical blank set), then,
// from the first line 0 on, every flag of every pixel against a region decode of
// an independent pixel/line count, and the line and frame periods in clocks.
module tb_svga_timing;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // --- instance A: 720x480, enable every clock ---
  logic [9:0] pc_a, lc_a;
  logic hb_a, vb_a, hs_a, vs_a, bl_a, cs_a;
  svga_timing dut_a (.clk, .rst_n, .pix_en(1'b1), .pixel_count(pc_a), .line_count(lc_a),
    .horiz_blank(hb_a), .vertical_blank(vb_a), .horiz_sync(hs_a), .vertical_sync(vs_a),
    .blank(bl_a), .comp_sync(cs_a));

  // --- instance B: 640x480, enable one clock in four ---
  logic [9:0] pc_b, lc_b;
  logic hb_b, vb_b, hs_b, vs_b, bl_b, cs_b, en_b;
  logic [1:0] div = 0;
  svga_timing #(.H_ACTIVE(640), .H_FRONT_PORCH(16), .H_SYNCH(96), .H_BACK_PORCH(48), .H_TOTAL(800),
                .V_ACTIVE(480), .V_FRONT_PORCH(9), .V_SYNCH(2), .V_BACK_PORCH(29), .V_TOTAL(520))
    dut_b (.clk, .rst_n, .pix_en(en_b), .pixel_count(pc_b), .line_count(lc_b),
    .horiz_blank(hb_b), .vertical_blank(vb_b), .horiz_sync(hs_b), .vertical_sync(vs_b),
    .blank(bl_b), .comp_sync(cs_b));
  assign en_b = (div == 2'd3);
  always @(posedge clk) if (rst_n) div <= div + 1;

  // reference models: x/y counters and region decode
  int xa = 0, ya = 525 - 33, xb = 0, yb = 520 - 33;
  bit armed_a = 0, armed_b = 0;
  int hs_rise_a = -1, vs_rise_a = -1, hs_rise_b = -1, cyc = 0;
  int hper_a = 0, vper_a = 0, hper_b = 0;
  logic hs_a_q = 0, vs_a_q = 0, hs_b_q = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // checks on the values present before this edge
    if (armed_a) begin
      check(pc_a == 10'(xa) && lc_a == 10'(ya), $sformatf("A counters %0d/%0d vs %0d/%0d", pc_a, lc_a, xa, ya));
      check(hb_a == (xa >= 720) && vb_a == (ya >= 487), "A blank flags");
      check(hs_a == (xa >= 727 && xa < 789), $sformatf("A hsync at x=%0d", xa));
      check(vs_a == (ya >= 491 && ya < 495), $sformatf("A vsync at y=%0d", ya));
      check(bl_a == (hb_a | vb_a) && !cs_a, "A blank = hblank | vblank, comp sync 0");
    end
    if (armed_b) begin
      check(pc_b == 10'(xb) && lc_b == 10'(yb), "B counters");
      check(hb_b == (xb >= 640) && vb_b == (yb >= 480), "B blank flags");
      check(hs_b == (xb >= 656 && xb < 752), "B hsync");
      check(vs_b == (yb >= 489 && yb < 491), "B vsync");
      check(bl_b == (hb_b | vb_b), "B blank");
    end
    // periods
    if (hs_a && !hs_a_q) begin if (hs_rise_a >= 0) hper_a = cyc - hs_rise_a; hs_rise_a = cyc; end
    if (vs_a && !vs_a_q) begin if (vs_rise_a >= 0) vper_a = cyc - vs_rise_a; vs_rise_a = cyc; end
    if (hs_b && !hs_b_q) begin if (hs_rise_b >= 0) hper_b = cyc - hs_rise_b; hs_rise_b = cyc; end
    hs_a_q = hs_a; vs_a_q = vs_a; hs_b_q = hs_b;
    // advance reference
    xa = (xa == 857) ? 0 : xa + 1;
    if (xa == 0) begin ya = (ya == 524) ? 0 : ya + 1; if (ya == 0) armed_a = 1; end
    if (en_b) begin
      xb = (xb == 799) ? 0 : xb + 1;
      if (xb == 0) begin yb = (yb == 519) ? 0 : yb + 1; if (yb == 0) armed_b = 1; end
    end
  end

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(lc_a == 10'(525 - 33) && vb_a && !hb_a && !hs_a && !vs_a && pc_a == 0, "A reset values");
    check(lc_b == 10'(520 - 33) && vb_b && !hb_b && !hs_b && !vs_b && pc_b == 0, "B reset values");
    @(negedge clk);
    rst_n = 1;
    // run until instance B has completed two frames after arming
    wait (armed_b);
    repeat (2 * 800 * 520 * 4) @(posedge clk);
    check(hper_a == 858, $sformatf("A line period %0d clocks", hper_a));
    check(vper_a == 858 * 525, $sformatf("A frame period %0d clocks", vper_a));
    check(hper_b == 800 * 4, $sformatf("B line period %0d clocks", hper_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
