// tb_decoder_config: self-checking testbench for decoder_config.
// Runs the sequence against an I2C slave model and compares the logged register
// writes, in order, with the composite-video configuration list (19 writes).
// Then restarts it with the slave refusing to acknowledge from the sixth transfer
// on: the sequence must stop there with error set and err_index = 5.
module tb_decoder_config;
  localparam int Q = 2;
  logic clk = 0, rst_n = 0, go = 0;
  logic done, error, scl_low, sda_low, sda_pull, scl, sda, nack_req = 0;
  logic [4:0] err_index;
  int checks = 0, failures = 0;

  // expected (register, value) pairs
  logic [15:0] exp_w [19] = '{16'h0004, 16'h1500, 16'h1741, 16'h2758, 16'h3a16,
                              16'h5004, 16'h0e80, 16'h5020, 16'h5218, 16'h58ed,
                              16'h77c5, 16'h7c93, 16'h7d00, 16'hd048, 16'hd5a0,
                              16'hd7ea, 16'he43e, 16'hea0f, 16'h0e00};

  always #5 clk = ~clk;

  decoder_config #(.QUARTER(Q)) dut (.*, .sda_in(sda));
  assign scl = ~scl_low;
  assign sda = ~(sda_low | sda_pull);
  i2c_slave_model #(.ADDR(7'h20)) slave (.scl(scl), .sda(sda), .nack_req(nack_req), .sda_pull(sda_pull));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done || error);
    check(done && !error, "sequence completes without error");
    check(slave.n_writes == 19, $sformatf("%0d register writes, expected 19", slave.n_writes));
    for (int i = 0; i < 19; i++)
      check({slave.reg_log[i], slave.val_log[i]} == exp_w[i],
            $sformatf("write %0d: %02h=%02h, expected %04h", i, slave.reg_log[i], slave.val_log[i], exp_w[i]));
    // second run: the slave stops acknowledging after five writes
    @(posedge clk);
    go <= 1;
    @(posedge clk);
    go <= 0;
    wait (slave.n_writes == 24);
    nack_req = 1;
    wait (done || error);
    check(error && !done, "NACK stops the sequence with an error");
    check(err_index == 5'd5, $sformatf("err_index %0d, expected 5", err_index));
    repeat (2000) @(posedge clk);
    check(slave.n_writes == 24, "no writes after the failed one");
    check(scl && sda, "bus released after abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
