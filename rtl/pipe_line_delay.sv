// pipe_line_delay: fixed pipeline delay for a bundle of signals.
//
// Passes a WIDTH-bit vector through DELAY registers (default one), so that d_out
// is d_in DELAY clocks late. In the video path it delays the sync and blank
// outputs of the SVGA timing generator by one clock, the read latency of the line
// buffers, so that they reach the video DAC together with the pixel they belong
// to. The one-clock delay follows the lab specification; the width is set by the
// user. Reset asynchronous, active low, to all zeros.
module pipe_line_delay #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DELAY = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_in,
  output logic [WIDTH-1:0] d_out
);

  logic [WIDTH-1:0] stage [DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '{default: '0};
    end else begin
      stage[0] <= d_in;
      for (int i = 1; i < DELAY; i++) stage[i] <= stage[i-1];
    end
  end

  assign d_out = stage[DELAY-1];

endmodule
