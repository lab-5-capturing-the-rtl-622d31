// tb_pipe_line_delay: self-checking testbench for pipe_line_delay.
// Random data through the default one-clock delay and a three-clock instance;
// each output must equal the input of one (three) clocks before.
module tb_pipe_line_delay;
  logic clk = 0, rst_n = 0;
  logic [3:0] d_in, d1, d3;
  logic [3:0] hist [4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pipe_line_delay dut1 (.clk, .rst_n, .d_in, .d_out(d1));
  pipe_line_delay #(.WIDTH(4), .DELAY(3)) dut3 (.clk, .rst_n, .d_in, .d_out(d3));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d_in = 0;
    hist = '{default: '0};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (d1 != 0 || d3 != 0) begin failures++; $display("FAIL: outputs not cleared by reset"); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i >= 3) begin
        checks += 2;
        if (d1 != hist[0]) begin failures++; $display("FAIL: 1-clock delay at %0d", i); end
        if (d3 != hist[2]) begin failures++; $display("FAIL: 3-clock delay at %0d", i); end
      end
      d_in = 4'($urandom);
      @(posedge clk);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = d_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
