// tb_c422_444: self-checking testbench for c422_444.
// Several lines of random Cb Y Cr Y words, each preceded by blanking with h_in
// high; h_in falls with the first Cb word. Pixel n of a line must appear, with
// pix_en high, in the clock after the word Y(n+2) arrives, i.e. 2n+6 clocks after
// the Cb01 word, as (Y_n, Cb of its pair, Cr of its pair). pix_en must alternate
// with a period of two clocks and fo/ho/vo must be f_in/h_in/v_in four clocks late.
module tb_c422_444;
  localparam int NPIX = 32, BLANK = 20;
  logic clk = 0, rst_n = 0;
  logic [9:0] d = 0, y_out, cb_out, cr_out;
  logic f_in = 0, h_in = 1, v_in = 0, pix_en, clk_out, fo, ho, vo;
  int checks = 0, failures = 0, cyc = 0;
  int ys [NPIX], cbs [NPIX/2], crs [NPIX/2];
  int sav_cyc = 0;
  logic [2:0] fhv_hist [5];
  logic pe_q = 0;
  always #5 clk = ~clk;
  c422_444 dut (.clk, .rst_n, .ycrcb_in(d), .f_in, .h_in, .v_in, .y_out, .cb_out, .cr_out,
                .pix_en, .clk_out, .fo, .ho, .vo);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // cycle-by-cycle checks of the delayed flags and the enable pattern
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cyc > 6) begin
      check({fo, ho, vo} == fhv_hist[3], "flags delayed by four clocks");
      if (cyc - sav_cyc > 4) check(pix_en != pe_q, "pix_en alternates");  // the phase may restart at SAV
      check(clk_out == ~pix_en, "clk_out is the 13.5 MHz square wave");
    end
    pe_q = pix_en;
  end
  always @(posedge clk) begin
    for (int k = 4; k > 0; k--) fhv_hist[k] = fhv_hist[k-1];
    fhv_hist[0] = {f_in, h_in, v_in};
  end

  initial begin
    fhv_hist = '{default: '0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int line = 0; line < 4; line++) begin
      // blanking: h high, words 200/040 (starting at a random odd/even phase)
      for (int i = 0; i < BLANK + line; i++) begin
        @(negedge clk); h_in = 1; d = (i % 2) ? 10'h040 : 10'h200;
        f_in = line[1]; v_in = line[0];
      end
      for (int p = 0; p < NPIX; p++) ys[p] = $urandom_range(1, 1022);
      for (int k = 0; k < NPIX / 2; k++) begin cbs[k] = $urandom_range(1, 1022); crs[k] = $urandom_range(1, 1022); end
      fork
        begin
          for (int w = 0; w < 2 * NPIX + 4; w++) begin
            @(negedge clk);
            h_in = 0;
            if (w == 0) sav_cyc = cyc;
            unique case (w % 4)
              0: d = 10'(cbs[(w / 4) % (NPIX / 2)]);
              2: d = 10'(crs[(w / 4) % (NPIX / 2)]);
              default: d = 10'(ys[(w / 2) % NPIX]);
            endcase
          end
        end
        begin
          @(negedge clk);   // the clock of Cb01
          for (int n = 0; n < NPIX; n++) begin
            while (cyc < sav_cyc + 2 * n + 6) @(negedge clk);
            #1;
            check(pix_en == 1, $sformatf("pix_en with pixel %0d", n));
            check(y_out == 10'(ys[n]) && cb_out == 10'(cbs[n / 2]) && cr_out == 10'(crs[n / 2]),
                  $sformatf("line %0d pixel %0d: %0d/%0d/%0d expected %0d/%0d/%0d", line, n,
                            y_out, cb_out, cr_out, ys[n], cbs[n / 2], crs[n / 2]));
          end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
