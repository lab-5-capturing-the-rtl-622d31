// c422_444: YCrCb 4:2:2 to 4:4:4 conversion.
//
// The 4:2:2 stream carries the words Cb01 Y0 Cr01 Y1 Cb23 Y2 Cr23 Y3 ... , one word
// per 27 MHz clock: every pixel has its own Y, and each Cb/Cr pair is shared by two
// pixels. A word counter (0 = Cb, 1 = Y, 2 = Cr, 3 = Y) is restarted at the start
// of active video, which is the falling edge of h_in, and otherwise runs freely
// modulo four. Three hold registers load Cb, Y and Cr when their word arrives and
// keep their last value otherwise. Whenever a Y word arrives, the hold registers as
// they were four (Cb), three (Y) and two (Cr) clocks earlier form one 4:4:4 pixel,
// which repeats each chroma pair for the two pixels it belongs to:
//   (Cb01,Y0,Cr01) (Cb01,Y1,Cr01) (Cb23,Y2,Cr23) (Cb23,Y3,Cr23) ...
// The word order, the hold-and-delay scheme and the 4-clock delay of the F/H/V
// flags come from the lab specification.
//
// Interface and timing: pixel n is registered on the clock that receives Y(n+2) and
// is held for two clocks. pix_en is high in the first clock of each new pixel, so
// pixels arrive at 13.5 MHz. Rather than deriving a second clock, the 13.5 MHz rate
// is delivered as this enable on the 27 MHz clock (this design's choice); clk_out is
// the matching 13.5 MHz square wave (the inverse of pix_en), whose rising edge falls
// in the middle of each pixel. fo, ho and vo are f_in, h_in and v_in delayed by four
// clocks. Reset asynchronous, active low.
module c422_444 #(
  parameter int unsigned DATA_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] ycrcb_in,
  input  logic              f_in,
  input  logic              h_in,
  input  logic              v_in,
  output logic [DATA_W-1:0] y_out,
  output logic [DATA_W-1:0] cb_out,
  output logic [DATA_W-1:0] cr_out,
  output logic              pix_en,
  output logic              clk_out,
  output logic              fo,
  output logic              ho,
  output logic              vo
);

  typedef enum logic [1:0] {W_CB = 2'd0, W_Y0 = 2'd1, W_CR = 2'd2, W_Y1 = 2'd3} word_e;

  word_e             word, word_q;
  logic              h_prev;
  logic [DATA_W-1:0] cb_hold, y_hold, cr_hold;
  logic [DATA_W-1:0] cb_d [4];
  logic [DATA_W-1:0] y_d  [3];
  logic [DATA_W-1:0] cr_d [2];
  logic [3:0]        f_d, h_d, v_d;

  // Position of the current word within its Cb Y Cr Y group.
  always_comb begin
    if (h_prev && !h_in) word = W_CB;
    else                 word = word_e'(word_q + 2'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q  <= W_Y1;
      h_prev  <= 1'b0;
      cb_hold <= '0;
      y_hold  <= '0;
      cr_hold <= '0;
      cb_d    <= '{default: '0};
      y_d     <= '{default: '0};
      cr_d    <= '{default: '0};
      y_out   <= '0;
      cb_out  <= '0;
      cr_out  <= '0;
      pix_en  <= 1'b0;
      f_d     <= '0;
      h_d     <= '0;
      v_d     <= '0;
    end else begin
      word_q <= word;
      h_prev <= h_in;

      unique case (word)
        W_CB:       cb_hold <= ycrcb_in;
        W_CR:       cr_hold <= ycrcb_in;
        W_Y0, W_Y1: y_hold  <= ycrcb_in;
      endcase

      // delay lines behind the hold registers
      cb_d[0] <= cb_hold;
      y_d[0]  <= y_hold;
      cr_d[0] <= cr_hold;
      for (int i = 1; i < 4; i++) cb_d[i] <= cb_d[i-1];
      for (int i = 1; i < 3; i++) y_d[i]  <= y_d[i-1];
      cr_d[1] <= cr_d[0];

      pix_en <= (word == W_Y0) || (word == W_Y1);
      if ((word == W_Y0) || (word == W_Y1)) begin
        cb_out <= cb_d[3];
        y_out  <= y_d[2];
        cr_out <= cr_d[1];
      end

      f_d <= {f_d[2:0], f_in};
      h_d <= {h_d[2:0], h_in};
      v_d <= {v_d[2:0], v_in};
    end
  end

  assign clk_out = ~pix_en;
  assign fo = f_d[3];
  assign ho = h_d[3];
  assign vo = v_d[3];

endmodule
