// tb_svga_constant_color: self-checking testbench for the 640x480 test generator.
// Runs the 100 MHz clock for two frames and measures on the pins: the pixel
// clock period (4 clocks), the line period (800 x 4 clocks), the horizontal sync
// width (96 x 4), the active line width (640 x 4, blank_z high), the frame period
// (520 lines), the vertical sync width (2 lines), the colour (constant during the
// active picture) and the number of active lines per frame (480).
module tb_svga_constant_color;
  logic clk = 0, rst_n = 0;
  logic pclk, hs_z, vs_z, bl_z, cs;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  svga_constant_color dut (.sys_clk(clk), .sys_rst_n(rst_n), .pixel_clock(pclk), .h_sync_z(hs_z),
    .v_sync_z(vs_z), .blank_z(bl_z), .comp_sync(cs), .r, .g, .b);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0, pclk_rise = -1, hs_fall = -1, vs_fall = -1, bl_rise = -1;
  int n_pclk = 0, n_lines = 0, active_lines = 0, frames = 0;
  logic pclk_q = 0, hs_q = 1, vs_q = 1, bl_q = 0;
  bit line_active = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pclk && !pclk_q) begin
      if (pclk_rise >= 0) check(cyc - pclk_rise == 4, "pixel clock period 4");
      pclk_rise = cyc;
    end
    if (!hs_z && hs_q) begin
      if (hs_fall >= 0) check(cyc - hs_fall == 3200, $sformatf("line period %0d", cyc - hs_fall));
      hs_fall = cyc;
      if (line_active) active_lines++;
      line_active = 0;
    end
    if (hs_z && !hs_q && hs_fall >= 0) check(cyc - hs_fall == 384, $sformatf("hsync width %0d", cyc - hs_fall));
    if (!vs_z && vs_q) begin
      if (vs_fall >= 0) begin
        check(cyc - vs_fall == 3200 * 520, $sformatf("frame period %0d", cyc - vs_fall));
        check(active_lines == 480, $sformatf("%0d active lines", active_lines));
        frames++;
      end
      vs_fall = cyc;
      active_lines = 0;
    end
    if (vs_z && !vs_q && vs_fall >= 0) check(cyc - vs_fall == 6400, $sformatf("vsync width %0d", cyc - vs_fall));
    if (bl_z && !bl_q) bl_rise = cyc;
    if (!bl_z && bl_q && bl_rise >= 0) begin
      check(cyc - bl_rise == 2560, $sformatf("active width %0d", cyc - bl_rise));
      line_active = 1;
    end
    if (bl_z) check(r == 8'd0 && g == 8'd128 && b == 8'd255 && !cs, "constant colour");
    pclk_q = pclk; hs_q = hs_z; vs_q = vs_z; bl_q = bl_z;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (frames == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
