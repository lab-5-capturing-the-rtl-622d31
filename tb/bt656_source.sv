// bt656_source: testbench model of the video decoder's ITU-R BT.656 output.
//
// Produces one 10-bit word per clock. Each line starts with the EAV code
// (3FF 000 000 XY, H=1), then BLANK_WORDS blanking words (Cb/Cr 200h, Y 040h),
// the SAV code (H=0) and ACTIVE_PIX pixels as Cb Y Cr Y words. Lines are numbered
// 1..525 and their F and V bits follow the NTSC 525-line layout (field 1 lines
// 4..265, active lines 20..263 and 283..525); F and V change in the EAV word.
// Active lines carry the tb_video_pkg test image, line index = line number;
// vertically blanked lines carry blanking values. With the defaults (720 pixels,
// 268 blanking words) a line is 1716 words, as for 27 MHz NTSC.
module bt656_source
  import tb_video_pkg::*;
#(
  parameter int ACTIVE_PIX  = 720,
  parameter int BLANK_WORDS = 268,
  parameter int FIRST_LINE  = 1
) (
  input  logic       clk,
  input  logic       run,
  output logic [9:0] data,
  output int         line,     // line number of the word on data
  output int         word      // word index within the line (0 = first EAV word)
);

  localparam int LINE_WORDS = 8 + BLANK_WORDS + 2 * ACTIVE_PIX;
  localparam int SAV_AT     = 4 + BLANK_WORDS;
  localparam int ACT_AT     = SAV_AT + 4;

  initial begin
    line = FIRST_LINE;
    word = 0;
  end

  always_ff @(posedge clk) begin
    if (run) begin
      if (word == LINE_WORDS - 1) begin
        word <= 0;
        line <= (line == 525) ? 1 : line + 1;
      end else begin
        word <= word + 1;
      end
    end
  end

  always_comb begin
    bit f, v;
    int a, pair, x;
    f = ntsc_f(line);
    v = ntsc_v(line);
    data = 10'h200;
    if (word < 4 || (word >= SAV_AT && word < ACT_AT)) begin
      a = (word < 4) ? word : word - SAV_AT;
      unique case (a)
        0: data = 10'h3FF;
        1, 2: data = 10'h000;
        default: data = xy_word(f, v, word < 4);
      endcase
    end else if (word < SAV_AT || v) begin
      data = word[0] ? 10'h040 : 10'h200;
    end else begin
      a    = word - ACT_AT;
      pair = a / 4;
      x    = a / 2;
      unique case (a % 4)
        0: data = 10'(pix_cb(line, pair));
        2: data = 10'(pix_cr(line, pair));
        default: data = 10'(pix_y(line, x));
      endcase
    end
  end

endmodule
