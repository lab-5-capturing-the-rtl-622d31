// neg_edge_detect: one-clock pulse on a one-to-zero transition.
//
// The input is sampled every clock; one_shot_out is high for exactly one clock,
// the clock after the sample in which sig_in is first seen low following a high.
// In the video path it watches the field bit F of the timing reference codes: F
// falls once per frame, at the start of the odd field, and the pulse restarts the
// SVGA timing generator so that the output raster stays locked to the camera.
// Reset asynchronous, active low; the pulse latency of one clock is this design's.
module neg_edge_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic sig_in,
  output logic one_shot_out
);

  logic sig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q        <= 1'b0;
      one_shot_out <= 1'b0;
    end else begin
      sig_q        <= sig_in;
      one_shot_out <= sig_q & ~sig_in;
    end
  end

endmodule
