// video_out_checker: end-to-end check of the live-video SVGA output.
//
// Samples the DAC-side pins on every falling edge of the pixel clock domain.
// Timing: the horizontal sync must recur every 858 clocks and last 62, and the
// vertical sync every 858 x 525 clocks and last 4 lines; every line must have
// either 0 or 720 active (blank_z high) pixels. Picture: the expected RGB of
// every camera line of the test image is computed beforehand with the
// floating-point model; each displayed active line must equal one whole camera
// line, pixel for pixel within one LSB. Lines of vertical blanking are black and
// match any blanking line. A vertical sync pulse may end early only when the
// display timing was restarted (restart high) during it; vsync_cut counts those. Consecutive picture lines must show each camera line
// exactly twice and then the next one (line doubling). Results are counted in
// checks/failures; doubled, odd_lines and even_lines count what was seen.
module video_out_checker
  import tb_video_pkg::*;
(
  input logic       clk,
  input logic       enable,
  input logic       restart,
  input logic       h_sync_z,
  input logic       v_sync_z,
  input logic       blank_z,
  input logic [7:0] r,
  input logic [7:0] g,
  input logic [7:0] b
);

  int checks = 0, failures = 0;
  int doubled = 0, odd_lines = 0, even_lines = 0, black_lines = 0, pic_lines = 0, frames = 0;

  logic [23:0] exp_img [1:525][720];
  logic [23:0] px [720];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL (video): %s at %0t", what, $time); end
  endtask

  initial begin
    for (int l = 1; l <= 525; l++)
      for (int x = 0; x < 720; x++)
        exp_img[l][x] = ntsc_v(l) ? ref_rgb(64, 512, 512)
                                  : ref_rgb(pix_y(l, x), pix_cb(l, x / 2), pix_cr(l, x / 2));
  end

  function automatic bit line_matches(input int l, input int shift);
    for (int x = 0; x < 720; x++) begin
      int xs;
      xs = x + shift;
      if (xs < 0 || xs >= 720) continue;
      if (!rgb_close(px[x], exp_img[l][xs])) return 0;
    end
    return 1;
  endfunction

  int cyc = 0, hs_fall = -1, vs_fall = -1, nact = 0, last_l = -1, rep = 0;
  logic hs_q = 1, vs_q = 1, bl_q = 0;
  bit   cut = 0;
  int   vsync_cut = 0;

  task automatic end_of_active_line();
    int found, nfound;
    bit black;
    check(nact == 720, $sformatf("%0d active pixels in a line", nact));
    black = 1;
    for (int x = 0; x < 720; x++) if (px[x] != 24'h0) black = 0;
    if (black) begin
      black_lines++;
      last_l = -1; rep = 0;
      return;
    end
    found = -1; nfound = 0;
    for (int l = 1; l <= 525; l++) begin
      if (ntsc_v(l)) continue;
      if (!rgb_close(px[0], exp_img[l][0])) continue;
      if (line_matches(l, 0)) begin found = l; nfound++; end
    end
    check(nfound == 1, $sformatf("display line shows one whole camera line (%0d matches)", nfound));
    if (nfound != 1) begin
      for (int s = -200; s <= 200; s++)
        for (int l = 1; l <= 525; l++)
          if (!ntsc_v(l) && line_matches(l, s)) begin
            $display("  diagnosis: camera line %0d matches with shift %0d", l, s);
            s = 1000; break;
          end
      last_l = -1; rep = 0;
      return;
    end
    pic_lines++;
    if (ntsc_f(found)) even_lines++; else odd_lines++;
    if (last_l < 0) begin
      rep = 1;
    end else if (found == last_l) begin
      rep++;
      check(rep == 2, $sformatf("camera line %0d shown %0d times", found, rep));
      if (rep == 2) doubled++;
    end else begin
      check(found == last_l + 1 && rep == 2, $sformatf("camera line %0d follows %0d after %0d repeats", found, last_l, rep));
      rep = 1;
    end
    last_l = found;
  endtask

  always @(negedge clk) if (enable) begin
    cyc++;
    if (!h_sync_z && hs_q) begin
      if (hs_fall >= 0) check(cyc - hs_fall == 858, $sformatf("line period %0d", cyc - hs_fall));
      hs_fall = cyc;
    end
    if (h_sync_z && !hs_q && hs_fall >= 0) check(cyc - hs_fall == 62, $sformatf("hsync width %0d", cyc - hs_fall));
    if (!v_sync_z && vs_q) begin
      if (vs_fall >= 0) begin
        check(cyc - vs_fall == 858 * 525, $sformatf("frame period %0d", cyc - vs_fall));
        frames++;
      end
      vs_fall = cyc;
    end
    if (restart && !v_sync_z) cut = 1;
    if (v_sync_z && !vs_q && vs_fall >= 0) begin
      // A restart of the display timing clears the sync flags; when it lands in
      // the sync pulse the pulse ends early.
      if (cut) vsync_cut++;
      check(cut ? (cyc - vs_fall < 4 * 858) : (cyc - vs_fall == 4 * 858), $sformatf("vsync width %0d", cyc - vs_fall));
      cut = 0;
    end
    if (blank_z) begin
      if (nact < 720) px[nact] = {r, g, b};
      nact++;
    end else if (bl_q) begin
      end_of_active_line();
      nact = 0;
    end
    hs_q = h_sync_z; vs_q = v_sync_z; bl_q = blank_z;
  end

endmodule
