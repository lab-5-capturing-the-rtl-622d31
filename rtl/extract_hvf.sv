// extract_hvf: ITU-R BT.656 timing reference decoder (line/field decoder).
//
// BT.656 marks the start and end of every active line with a four-word timing
// reference signal: an all-ones word, two all-zero words, then the XY status word.
// Read as an 8-bit word, XY carries F in bit 6 (0 = odd field 1, 1 = even field 2),
// V in bit 5 (1 = field blanking) and H in bit 4 (0 = SAV, 1 = EAV); its low bits
// are protection bits and are not checked. With DATA_W above 8 the 8-bit word sits
// in the most significant bits, so F, V and H are bits DATA_W-2, DATA_W-3 and
// DATA_W-4 (8, 7, 6 for 10-bit samples).
//
// A three-word history is compared against the preamble (FF 00 00 on the eight
// most significant bits, so that 3FC..3FF all count as the ones word and an
// 8-bit source can drive the top bits with the low bits tied to 0); when it matches, the
// current word is XY and the F, V and H registers load its flags one clock later.
// F and V are output from those registers. The data stream and the H flag are both
// delayed by a further five clocks, so that ycrcb_out is ycrcb_in five clocks late
// and h_out falls in the same clock in which the first Cb sample of the active line
// appears on ycrcb_out (and rises with the first word after the EAV code).
// The preamble match, the five-clock delays and the flag bit positions follow the
// lab specification; this alignment of h_out with the data is this design's choice.
//
// Interface: one word per clock (27 MHz LLC). Reset asynchronous, active low.
module extract_hvf #(
  parameter int unsigned DATA_W = 10,
  parameter int unsigned DELAY  = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] ycrcb_in,
  output logic [DATA_W-1:0] ycrcb_out,
  output logic              f_out,
  output logic              v_out,
  output logic              h_out,
  output logic              trs_seen   // pulses one clock after each XY word
);

  logic [DATA_W-1:0] hist [3];          // hist[0] = previous word
  logic [DATA_W-1:0] dly  [DELAY];
  logic [DELAY-1:0]  h_dly;
  logic              h_reg;
  logic              preamble;

  assign preamble = (hist[2][DATA_W-1 -: 8] == 8'hFF) && (hist[1][DATA_W-1 -: 8] == 8'h00)
                 && (hist[0][DATA_W-1 -: 8] == 8'h00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist     <= '{default: '0};
      f_out    <= 1'b0;
      v_out    <= 1'b0;
      h_reg    <= 1'b0;
      trs_seen <= 1'b0;
    end else begin
      hist[0]  <= ycrcb_in;
      hist[1]  <= hist[0];
      hist[2]  <= hist[1];
      trs_seen <= preamble;
      if (preamble) begin
        f_out <= ycrcb_in[DATA_W-2];
        v_out <= ycrcb_in[DATA_W-3];
        h_reg <= ycrcb_in[DATA_W-4];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly   <= '{default: '0};
      h_dly <= '0;
    end else begin
      dly[0] <= ycrcb_in;
      for (int i = 1; i < DELAY; i++) dly[i] <= dly[i-1];
      h_dly <= {h_dly[DELAY-2:0], h_reg};
    end
  end

  assign ycrcb_out = dly[DELAY-1];
  assign h_out     = h_dly[DELAY-1];

endmodule
