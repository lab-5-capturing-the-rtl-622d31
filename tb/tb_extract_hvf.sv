// tb_extract_hvf: self-checking testbench for extract_hvf.
// A BT.656 source with short lines (8 pixels, 12 blanking words) runs through a
// whole 525-line frame and more. An independent model records every input word
// and the flags of every XY word. Checks each clock: ycrcb_out is the input of
// five clocks before; F and V are those of the latest XY word; h_out is the H of
// the latest XY word as it was five clocks before; h_out falls exactly when the
// first Cb of an active line reaches ycrcb_out. Also counts F and V transitions.
// From line 300 on, the two low bits of every word are forced to 0, as when an
// 8-bit source drives the top bits: the ones word becomes 3FC and must still match.
module tb_extract_hvf;
  import tb_video_pkg::*;
  localparam int AP = 8, BW = 12;
  localparam int LW = 8 + BW + 2 * AP, ACT_AT = 8 + BW;
  logic clk = 0, rst_n = 0, run = 0;
  logic [9:0] din, dout;
  logic f_out, v_out, h_out, trs_seen;
  logic mask8 = 0;
  logic [9:0] dm;
  assign dm = mask8 ? {din[9:2], 2'b00} : din;
  int line, word;
  int checks = 0, failures = 0, f_falls = 0, v_changes = 0, sav_aligned = 0, xy_seen = 0;
  logic [9:0] in_hist [8];
  int         word_hist [8];
  logic       h_hist [8];
  logic       f_m = 0, v_m = 0, h_m = 0, h_out_q = 0, f_q = 0, v_q = 0;
  always #5 clk = ~clk;

  bt656_source #(.ACTIVE_PIX(AP), .BLANK_WORDS(BW)) src (.clk, .run, .data(din), .line, .word);
  extract_hvf dut (.clk, .rst_n, .ycrcb_in(dm), .ycrcb_out(dout), .f_out, .v_out, .h_out, .trs_seen);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s (line %0d word %0d)", what, line, word); end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) if (run) begin
    // values before this edge
    if (cyc > 10) begin
      check(dout == in_hist[4], "data delayed by five clocks");
      check(f_out == f_m && v_out == v_m, "F and V of the latest XY word");
      check(h_out == h_hist[4], "H delayed by five clocks");
      if (word_hist[4] == ACT_AT && !ntsc_v(line) && word > ACT_AT) begin
        check(h_out_q && !h_out, "h_out falls with the first Cb on ycrcb_out");
        sav_aligned++;
      end
      if (f_q && !f_out) f_falls++;
      if (v_q != v_out) v_changes++;
    end
    h_out_q = h_out; f_q = f_out; v_q = v_out;
    // model update: flags of an XY word become visible after this edge
    for (int k = 7; k > 0; k--) begin in_hist[k] = in_hist[k-1]; word_hist[k] = word_hist[k-1]; h_hist[k] = h_hist[k-1]; end
    in_hist[0] = dm; word_hist[0] = word; h_hist[0] = h_m;
    if (word == 3 || word == 8 + BW - 1) begin
      f_m = ntsc_f(line); v_m = ntsc_v(line); h_m = (word == 3); xy_seen++;
    end
    cyc++;
    if (line == 300) mask8 <= 1;
  end

  initial begin
    in_hist = '{default: '0}; word_hist = '{default: 0}; h_hist = '{default: 0};
    repeat (2) @(posedge clk);
    @(negedge clk) begin rst_n = 1; run = 1; end
    repeat (LW * 530) @(posedge clk);
    check(f_falls == 2, $sformatf("%0d falling F edges in 530 lines, expected 2", f_falls));
    check(v_changes == 4, $sformatf("%0d V changes in 530 lines, expected 4", v_changes));
    check(mask8, "8-bit style words were applied");
    check(sav_aligned > 400, $sformatf("%0d active lines checked", sav_aligned));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
