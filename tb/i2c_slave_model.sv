// i2c_slave_model: testbench model of an I2C register-write slave.
//
// Watches the bus levels scl and sda. A falling SDA while SCL is high is a START,
// a rising SDA while SCL is high a STOP. Bits are sampled on rising SCL; after
// each eighth bit the model acknowledges by pulling SDA low (sda_pull) for one
// clock, provided the first byte carried its address with the write bit and
// nack_req is low. A transfer of exactly three acknowledged bytes that ends in a
// STOP is logged as a register write (reg_log/val_log, n_writes).
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h20
) (
  input  logic scl,
  input  logic sda,
  input  logic nack_req,
  output logic sda_pull
);

  int         n_starts = 0;
  int         n_stops = 0;
  int         n_writes = 0;
  int         n_nacks = 0;
  logic [7:0] reg_log [64];
  logic [7:0] val_log [64];

  int         bitcnt = 0;
  int         nbytes = 0;
  logic [7:0] shreg = '0;
  logic [7:0] bytes [4];
  bit         addressed = 0;
  bit         in_xfer = 0;

  initial sda_pull = 1'b0;

  always @(negedge sda) if (scl) begin
    n_starts++;
    in_xfer   = 1;
    bitcnt    = 0;
    nbytes    = 0;
    addressed = 0;
  end

  always @(posedge sda) if (scl) begin
    n_stops++;
    if (in_xfer && addressed && nbytes == 3 && n_writes < 64) begin
      reg_log[n_writes] = bytes[1];
      val_log[n_writes] = bytes[2];
      n_writes++;
    end
    in_xfer = 0;
  end

  always @(posedge scl) if (in_xfer && bitcnt < 8) begin
    shreg = {shreg[6:0], sda};
    bitcnt++;
  end

  always @(negedge scl) if (in_xfer) begin
    if (bitcnt == 8) begin
      if (nbytes < 4) bytes[nbytes] = shreg;
      if (nbytes == 0) addressed = (shreg[7:1] == ADDR) && !shreg[0] && !nack_req;
      if (addressed) sda_pull <= 1'b1;
      else           n_nacks++;
      nbytes++;
      bitcnt = 9;
    end else if (bitcnt == 9) begin
      sda_pull <= 1'b0;
      bitcnt = 0;
    end
  end

endmodule
