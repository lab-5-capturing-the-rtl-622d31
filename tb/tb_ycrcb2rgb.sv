// tb_ycrcb2rgb: self-checking testbench for ycrcb2rgb.
// Drives corner cases and random 10-bit samples (inside and outside the legal
// ranges) with an irregular enable and compares each result, taken after the
// next enable, with a floating-point model (within one LSB).
// Also checks that the sideband bits travel with their pixel and that out_en
// follows en by one clock. Counts how often input limiting and output
// saturation were exercised.
module tb_ycrcb2rgb;
  import lab5_pkg::*;
  import tb_video_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, out_en;
  logic [9:0] y = 0, cb = 0, cr = 0;
  logic [2:0] sb_in = 0, sb_out;
  rgb_t rgb;
  int checks = 0, failures = 0, n_limited = 0, n_sat = 0;
  logic [23:0] exp_q [$];
  logic [2:0]  sb_q  [$];
  always #5 clk = ~clk;
  ycrcb2rgb dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int corner [8][3] = '{'{64, 512, 512}, '{940, 512, 512}, '{0, 512, 512}, '{1023, 512, 512},
                          '{1023, 1023, 1023}, '{500, 64, 960}, '{500, 960, 64}, '{64, 0, 0}};
    logic en_q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      check(out_en == en_q, "out_en follows en by one clock");
      en = (i < 16) ? 1'b1 : 1'($urandom_range(0, 2) != 0);
      if (en) begin
        int yy, bb, rr;
        if (i < 8) begin yy = corner[i][0]; bb = corner[i][1]; rr = corner[i][2]; end
        else begin yy = $urandom_range(1, 1022); bb = $urandom_range(1, 1022); rr = $urandom_range(1, 1022); end
        y = 10'(yy); cb = 10'(bb); cr = 10'(rr); sb_in = 3'($urandom);
        if (yy < 64 || yy > 940 || bb < 64 || bb > 960 || rr < 64 || rr > 960) n_limited++;
        exp_q.push_back(ref_rgb(yy, bb, rr));
        sb_q.push_back(sb_in);
      end
      en_q = en;
      @(posedge clk);
      // after this edge rgb holds the pixel given with the previous enable
      if (en && exp_q.size() == 2) begin
        logic [23:0] e;
        logic [2:0]  s;
        e = exp_q.pop_front();
        s = sb_q.pop_front();
        #1;
        check(rgb_close(rgb, e), $sformatf("rgb %h expected %h", rgb, e));
        check(sb_out == s, "sideband aligned with pixel");
        if (e[23:16] == 0 || e[23:16] == 255 || e[15:8] == 0 || e[15:8] == 255 || e[7:0] == 0 || e[7:0] == 255) n_sat++;
      end
    end
    check(n_limited > 100 && n_sat > 100, $sformatf("limiting %0d, saturation %0d times", n_limited, n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
