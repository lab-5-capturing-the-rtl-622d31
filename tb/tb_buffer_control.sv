// tb_buffer_control: self-checking testbench for buffer_control with two
// line_buffer instances (the line doubler).
// Write side: 1716-clock lines with a pixel every other clock (858 per line), H
// high for the first 138 pixels; each pixel carries its line number and its index
// within the line. Read side: an 858-clock display line counter, started at a
// chosen phase to the write lines. Checks: write address equals the pixel index
// and the written buffer alternates per line; every displayed line reads a single
// complete camera line, at address = display pixel + RD_OFFSET; each camera line
// is displayed on exactly two consecutive display lines. Run at several phases.
module tb_buffer_control;
  import lab5_pkg::*;
  localparam int OFS = 137;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_h = 0, rd_hblank_start = 0, wr_sel, line_swap;
  rgb_t wr_rgb = '0, rd_rgb, buf_wdata;
  rgb_t buf_rdata [2];
  logic [1:0] buf_we;
  logic [9:0] buf_waddr, buf_raddr, rd_addr = 0;
  int checks = 0, failures = 0, swaps = 0, doubled = 0;
  always #5 clk = ~clk;

  buffer_control #(.RD_OFFSET(OFS)) dut (.*);
  for (genvar i = 0; i < 2; i++) begin : g_lb
    line_buffer lb (.clk, .we(buf_we[i]), .waddr(buf_waddr), .wdata(buf_wdata), .raddr(buf_raddr), .rdata(buf_rdata[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_phase(input int phi, input int n_lines);
    int wc, p, wline, last_l, same_cnt, cur_l, dline;
    bit line_ok, sel_prev, started, first;
    rst_n = 0; wr_en = 0; wr_h = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wc = 0; p = (858 - phi) % 858; wline = 0; last_l = -1; same_cnt = 0; dline = 0; cur_l = -1; line_ok = 1;
    sel_prev = 0; started = 0; first = 1;
    for (int c = 0; c < n_lines * 1716; c++) begin
      // drive inputs for this clock
      wr_en = (wc % 2 == 0);
      wr_h  = (wc / 2 < 138);
      wr_rgb = {8'(wline), 16'(wc / 2)};
      rd_addr = 10'(p);
      rd_hblank_start = (p == 720);
      #1;
      if (wr_en) begin
        check(buf_waddr == 10'(wc / 2), "write address equals pixel index");
        check(buf_we == (wr_sel ? 2'b10 : 2'b01), "one buffer written");
      end
      if (wc == 0) begin
        swaps += line_swap;
        if (c > 0) check(line_swap && wr_sel != sel_prev, "buffers swap at H rising");
        sel_prev = wr_sel;
      end
      @(posedge clk);
      #1;
      // rd_rgb now holds the word addressed with p
      if (c > 4 * 1716 && p == 0) started = 1;
      if (started && p < 720 && p + OFS < 858) begin
        if (p == 0) cur_l = int'(rd_rgb.r);
        if (rd_rgb.r != 8'(cur_l) || {rd_rgb.g, rd_rgb.b} != 16'(p + OFS)) line_ok = 0;
      end
      if (p == 719 && started) begin
        check(line_ok, $sformatf("display line %0d reads one whole camera line (phase %0d)", dline, phi));
        if (cur_l == last_l) same_cnt++;
        else begin
          if (last_l >= 0 && !first) begin
            check(same_cnt == 2 && cur_l == last_l + 1,
                  $sformatf("camera line %0d shown %0d times, next %0d", last_l, same_cnt, cur_l));
            if (same_cnt == 2) doubled++;
          end
          if (last_l >= 0) first = 0;
          same_cnt = 1;
        end
        last_l = cur_l; line_ok = 1; dline++;
      end
      @(negedge clk);
      wc = (wc == 1715) ? 0 : wc + 1;
      if (wc == 0) wline++;
      p = (p == 857) ? 0 : p + 1;
    end
  endtask

  initial begin
    run_phase(14, 14);
    run_phase(300, 14);
    run_phase(800, 14);
    check(swaps > 30 && doubled > 20, $sformatf("%0d swaps, %0d doubled lines", swaps, doubled));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
