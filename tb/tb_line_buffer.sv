// tb_line_buffer: self-checking testbench for line_buffer.
// Random writes and reads against a shadow array; the read data must appear one
// clock after the read address, also when reading an address being written.
module tb_line_buffer;
  import lab5_pkg::*;
  logic clk = 0, we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  rgb_t wdata = '0, rdata;
  rgb_t shadow [1024];
  bit   valid [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  line_buffer dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rgb_t expect_q;
    bit   expect_v;
    // fill every word once
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = rgb_t'($urandom);
      shadow[a] = wdata; valid[a] = 1;
    end
    @(negedge clk) we = 0;
    expect_v = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rdata != expect_q) begin failures++; $display("FAIL: read %h expected %h", rdata, expect_q); end
      end
      we    = $urandom_range(0, 1);
      waddr = 10'($urandom);
      wdata = rgb_t'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 10'($urandom);
      expect_q = shadow[raddr];   // read-before-write on a same-address clash
      expect_v = 1;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
