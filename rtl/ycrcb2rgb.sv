// ycrcb2rgb: YCrCb (10-bit, 4:4:4) to 24-bit RGB colour space conversion.
//
//   R = k1*(Y-64) + k2*(Cr-512)
//   G = k1*(Y-64) - k3*(Cr-512) - k4*(Cb-512)
//   B = k1*(Y-64) + k5*(Cb-512)
//
// The equations, the offsets and the range rules follow the lab specification:
// inputs are first limited to their legal ranges (Y 64..940, Cb and Cr 64..960) and
// each result is saturated to 0..255, since the results may fall outside that range
// even for legal inputs. The constants are this design's: the ITU-R BT.601
// coefficients 1.164, 1.596, 0.813, 0.392 and 2.017, divided by four because the
// inputs are 10-bit and the outputs 8-bit, in fixed point with FRAC fraction bits
// (k = round(coefficient / 4 * 2**FRAC)). Results are rounded to nearest.
//
// Pipeline: two registers, both advanced by the pixel enable en. The first holds
// the limited, offset inputs; the second the saturated RGB. A pixel presented with
// en is taken into the first register and reaches rgb at the next en, so at the
// 13.5 MHz pixel rate the latency is one pixel (two clocks plus one). out_en is
// high in the clock after each en, when rgb has just changed. The sideband flags sb_in
// (H, V, F) travel through the same two registers so they stay aligned with the
// pixels. Reset asynchronous, active low.
module ycrcb2rgb
  import lab5_pkg::*;
#(
  parameter int unsigned DATA_W = 10,
  parameter int unsigned FRAC   = 12,
  parameter int          K1     = 1192,   // 1.164383/4 * 4096
  parameter int          K2     = 1634,   // 1.596027/4 * 4096
  parameter int          K3     = 832,    // 0.812968/4 * 4096
  parameter int          K4     = 401,    // 0.391762/4 * 4096
  parameter int          K5     = 2066,   // 2.017232/4 * 4096
  parameter int unsigned SB_W   = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] y,
  input  logic [DATA_W-1:0] cb,
  input  logic [DATA_W-1:0] cr,
  input  logic [SB_W-1:0]   sb_in,
  output rgb_t              rgb,
  output logic              out_en,
  output logic [SB_W-1:0]   sb_out
);

  localparam int unsigned ACC_W = DATA_W + FRAC + 4;
  localparam logic [DATA_W-1:0] Y_MIN = DATA_W'(64);
  localparam logic [DATA_W-1:0] Y_MAX = DATA_W'(940);
  localparam logic [DATA_W-1:0] C_MIN = DATA_W'(64);
  localparam logic [DATA_W-1:0] C_MAX = DATA_W'(960);

  function automatic logic [DATA_W-1:0] limit(input logic [DATA_W-1:0] v,
                                              input logic [DATA_W-1:0] lo,
                                              input logic [DATA_W-1:0] hi);
    if (v < lo)      return lo;
    else if (v > hi) return hi;
    else             return v;
  endfunction

  function automatic logic [7:0] sat8(input logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W-1:0] q;
    q = (acc + (ACC_W'(1) <<< (FRAC - 1))) >>> FRAC;
    if (q < 0)        return 8'd0;
    else if (q > 255) return 8'd255;
    else              return q[7:0];
  endfunction

  // Stage 1: legal-range limiting and offset removal.
  logic signed [DATA_W:0] yo, cbo, cro;
  logic [SB_W-1:0]        sb1;

  // Stage 2 inputs.
  logic signed [ACC_W-1:0] ky, kcr_r, kcr_g, kcb_g, kcb_b;

  always_comb begin
    ky    = ACC_W'(K1) * ACC_W'(yo);
    kcr_r = ACC_W'(K2) * ACC_W'(cro);
    kcr_g = ACC_W'(K3) * ACC_W'(cro);
    kcb_g = ACC_W'(K4) * ACC_W'(cbo);
    kcb_b = ACC_W'(K5) * ACC_W'(cbo);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yo     <= '0;
      cbo    <= '0;
      cro    <= '0;
      sb1    <= '0;
      rgb    <= '0;
      sb_out <= '0;
      out_en <= 1'b0;
    end else begin
      out_en <= en;
      if (en) begin
        yo     <= $signed({1'b0, limit(y,  Y_MIN, Y_MAX)}) - (DATA_W+1)'(64);
        cbo    <= $signed({1'b0, limit(cb, C_MIN, C_MAX)}) - (DATA_W+1)'(512);
        cro    <= $signed({1'b0, limit(cr, C_MIN, C_MAX)}) - (DATA_W+1)'(512);
        sb1    <= sb_in;
        rgb.r  <= sat8(ky + kcr_r);
        rgb.g  <= sat8(ky - kcr_g - kcb_g);
        rgb.b  <= sat8(ky + kcb_b);
        sb_out <= sb1;
      end
    end
  end

endmodule
