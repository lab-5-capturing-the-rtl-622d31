// oddr_clock_out: behavioural model of a DDR output flip-flop with clock enable
// and synchronous set/reset (an FPGA I/O-block primitive).
//
// D0 is captured on the rising edge of C0 and D1 on the rising edge of C1, where
// C1 is the inverse of C0; Q presents the D0 capture while C0 is high and the D1
// capture while C0 is low, so the output changes on both clock edges. R and S act
// at the capturing edge (R wins). Tied to constant D0/D1 it forwards its clock to
// a pin with the same I/O-block delay as the data, which is how the pixel clock is
// sent to the video DAC. This is a model of the vendor primitive, not logic for
// synthesis: the output mux is driven by the clock itself. Port names follow the
// primitive; the behaviour is written from its generic description.
module oddr_clock_out (
  input  logic C0,
  input  logic C1,
  input  logic CE,
  input  logic D0,
  input  logic D1,
  input  logic R,
  input  logic S,
  output logic Q
);

  logic q0;
  logic q1;

  always_ff @(posedge C0) begin
    if (R)       q0 <= 1'b0;
    else if (S)  q0 <= 1'b1;
    else if (CE) q0 <= D0;
  end

  always_ff @(posedge C1) begin
    if (R)       q1 <= 1'b0;
    else if (S)  q1 <= 1'b1;
    else if (CE) q1 <= D1;
  end

  assign Q = C0 ? q0 : q1;

endmodule
