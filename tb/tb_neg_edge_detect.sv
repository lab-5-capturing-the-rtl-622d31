// tb_neg_edge_detect: self-checking testbench for neg_edge_detect.
// Random input; the output must be high exactly when the input was high two
// clocks ago and low one clock ago (one pulse per falling edge, one clock late).
module tb_neg_edge_detect;
  logic clk = 0, rst_n = 0, sig_in = 0, one_shot_out;
  logic [1:0] hist = '0;
  int checks = 0, failures = 0, pulses = 0, edges = 0;
  always #5 clk = ~clk;
  neg_edge_detect dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (one_shot_out !== (hist[1] & ~hist[0])) begin
        failures++;
        $display("FAIL at %0d: out %b hist %b", i, one_shot_out, hist);
      end
      pulses += one_shot_out;
      sig_in = ($urandom_range(0, 3) == 0) ? ~sig_in : sig_in;
      @(posedge clk);
      edges += (hist[0] & ~sig_in);
      hist = {hist[0], sig_in};
    end
    checks++;
    if (pulses < 50 || pulses > edges) begin failures++; $display("FAIL: %0d pulses for %0d edges", pulses, edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
