// tb_oddr_clock_out: self-checking testbench for the DDR output flop model.
// With D0=1, D1=0 the output must follow the clock; with D0=0, D1=1 its inverse;
// with random data each half period must carry the value captured at its edge;
// R must force zero and CE=0 must hold the captures.
module tb_oddr_clock_out;
  logic c = 0, ce = 1, d0 = 0, d1 = 0, r = 1, s = 0, q;
  int checks = 0, failures = 0;
  always #5 c = ~c;
  oddr_clock_out dut (.C0(c), .C1(~c), .CE(ce), .D0(d0), .D1(d1), .R(r), .S(s), .Q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge c);
    #2 check(q == 0, "reset high phase");
    @(negedge c); #2 check(q == 0, "reset low phase");
    r = 0; d0 = 1; d1 = 0;
    repeat (20) begin
      @(posedge c); #2 check(q == 1, "forwarded clock high");
      @(negedge c); #2 check(q == 0, "forwarded clock low");
    end
    d0 = 0; d1 = 1;
    @(posedge c);
    repeat (20) begin
      @(posedge c); #2 check(q == 0, "inverted clock high phase");
      @(negedge c); #2 check(q == 1, "inverted clock low phase");
    end
    repeat (50) begin
      logic a, b;
      @(posedge c); #1 a = $urandom_range(0, 1); d0 = a; b = $urandom_range(0, 1); d1 = b;
      @(negedge c); #2 check(q == b, "low half carries D1");
      @(posedge c); #2 check(q == a, "high half carries D0");
    end
    ce = 0; d0 = 0; d1 = 0;
    @(posedge c); @(posedge c); #2 check(q == 1'(d0) || q == dut.q0, "CE low holds");
    ce = 1; s = 1;
    @(posedge c); @(negedge c); #2 check(q == 1, "S sets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
