// tb_i2c_master: self-checking testbench for i2c_master.
// Two transfers against a slave model: one to the slave's address (all bytes
// acknowledged, the register write must arrive intact, with one START and one
// STOP) and one to a wrong address (no acknowledge: the master must stop after
// the first byte and report ack_error). The transfer length is checked against
// 116 quarter periods: START 4 + 3 bytes x 9 clocks x 4 + STOP 4.
module tb_i2c_master;
  localparam int Q = 4;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [6:0] dev_addr;
  logic [7:0] reg_addr, reg_data;
  logic busy, done, ack_error, scl_low, sda_low, sda_pull, scl, sda;
  int checks = 0, failures = 0;
  int t0, t1, high_changes;

  always #5 clk = ~clk;

  i2c_master #(.QUARTER(Q)) dut (.*, .sda_in(sda));
  assign scl = ~scl_low;
  assign sda = ~(sda_low | sda_pull);
  i2c_slave_model #(.ADDR(7'h20)) slave (.scl(scl), .sda(sda), .nack_req(1'b0), .sda_pull(sda_pull));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SDA may change while SCL is high only as START or STOP.
  logic sda_q = 1'b1;
  always @(posedge clk) begin
    if (scl && sda != sda_q && busy) high_changes++;
    sda_q <= sda;
  end

  task automatic transfer(input logic [6:0] a, input logic [7:0] r, input logic [7:0] d);
    @(posedge clk);
    dev_addr <= a; reg_addr <= r; reg_data <= d; start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = $time / 10;
    @(posedge clk iff done);
    t1 = $time / 10;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    high_changes = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    slave.n_starts = 0;   // ignore the bus settling from power-up values
    slave.n_stops = 0;
    check(!busy && scl && sda, "bus idle after reset");
    transfer(7'h20, 8'h3a, 8'h16);
    check(!ack_error, "no ack error on good address");
    check(slave.n_writes == 1, "one register write logged");
    check(slave.reg_log[0] == 8'h3a && slave.val_log[0] == 8'h16, "register and value received");
    check(slave.n_starts == 1 && slave.n_stops == 1, $sformatf("one START and one STOP (%0d, %0d)", slave.n_starts, slave.n_stops));
    check(high_changes == 2, $sformatf("SDA changed under high SCL %0d times, expected 2", high_changes));
    check((t1 - t0) >= 116 * Q && (t1 - t0) <= 116 * Q + 2,
          $sformatf("transfer took %0d clocks, expected %0d", t1 - t0, 116 * Q));
    repeat (10) @(posedge clk);
    check(scl && sda && !busy, "bus released after transfer");
    high_changes = 0;
    transfer(7'h21, 8'h00, 8'h04);
    check(ack_error, "ack error on wrong address");
    check(slave.n_writes == 1, "no register write logged after NACK");
    check(slave.n_starts == 2 && slave.n_stops == 2, "NACK transfer ends with STOP");
    check((t1 - t0) >= 44 * Q && (t1 - t0) <= 44 * Q + 2,
          $sformatf("aborted transfer took %0d clocks, expected %0d", t1 - t0, 44 * Q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
