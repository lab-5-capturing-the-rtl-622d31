// tb_video_pkg: reference functions shared by the video testbenches.
//
// Test image: a deterministic pattern of 10-bit samples that covers the whole
// range the converter must handle, including values below and above the legal
// ranges (Y 64..940, Cb/Cr 64..960), while never producing the reserved codes
// 0x000 and 0x3FF. ref_rgb is an independent floating-point model of the colour
// conversion (ITU-R BT.601 coefficients, 10-bit in, 8-bit out, inputs limited to
// their legal ranges, results rounded and saturated).
package tb_video_pkg;

  function automatic int pix_y(input int line, input int x);
    return 16 + ((line * 37 + x * 11) % 990);
  endfunction

  function automatic int pix_cb(input int line, input int pair);
    return 40 + ((line * 53 + pair * 29) % 950);
  endfunction

  function automatic int pix_cr(input int line, input int pair);
    return 40 + ((line * 71 + pair * 17) % 950);
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int sat_round(input real v);
    int q;
    q = $rtoi(v + 1000.5) - 1000;   // round half up, also for negative v
    return clampi(q, 0, 255);
  endfunction

  // Returns {r, g, b}.
  function automatic logic [23:0] ref_rgb(input int y, input int cb, input int cr);
    real yy, bb, rr;
    int r, g, b;
    yy = real'(clampi(y, 64, 940) - 64);
    bb = real'(clampi(cb, 64, 960) - 512);
    rr = real'(clampi(cr, 64, 960) - 512);
    r = sat_round((1.164383 * yy + 1.596027 * rr) / 4.0);
    g = sat_round((1.164383 * yy - 0.812968 * rr - 0.391762 * bb) / 4.0);
    b = sat_round((1.164383 * yy + 2.017232 * bb) / 4.0);
    return {r[7:0], g[7:0], b[7:0]};
  endfunction

  function automatic bit rgb_close(input logic [23:0] a, input logic [23:0] e);
    for (int i = 0; i < 3; i++) begin
      int da, de;
      da = int'(a[8*i +: 8]);
      de = int'(e[8*i +: 8]);
      if (da - de > 1 || de - da > 1) return 1'b0;
    end
    return 1'b1;
  endfunction

  // 10-bit XY word of a timing reference: 1 F V H P3 P2 P1 P0 0 0.
  function automatic logic [9:0] xy_word(input bit f, input bit v, input bit h);
    logic [3:0] p;
    p = {v ^ h, f ^ h, f ^ v, f ^ v ^ h};
    return {1'b1, f, v, h, p, 2'b00};
  endfunction

  // NTSC 525-line field and blanking bits by line number (1..525).
  function automatic bit ntsc_f(input int line);
    return !(line >= 4 && line <= 265);
  endfunction
  function automatic bit ntsc_v(input int line);
    return (line <= 19) || (line >= 264 && line <= 282);
  endfunction

endpackage
