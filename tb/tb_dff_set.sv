// tb_dff_set: self-checking test of the D flip-flop with asynchronous set.
//
// Drives random data for 300 clock cycles and checks that q equals the d
// sampled at the previous rising edge. Every so often it raises set between
// clock edges and checks that q goes to 1 at once, stays 1 while set is held
// across a clock edge with d = 0, and follows d again after set is released.
module tb_dff_set;

  logic clk = 1'b0;
  logic set, d, q;
  int   checks   = 0;
  int   failures = 0;
  int   cycles   = 0;

  dff_set dut (.clk(clk), .set(set), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic expected, input string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: q=%0b expected=%0b at cycle %0d", what, q, expected, cycles);
    end
  endtask

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sampled;
    set = 1'b0;
    d   = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      if (i % 37 == 10) begin
        // asynchronous set between edges
        d   = 1'b0;
        @(posedge clk);
        @(negedge clk);
        check(1'b0, "before set");
        set = 1'b1;
        #1;
        check(1'b1, "set acts without a clock edge");
        @(posedge clk); #1;
        check(1'b1, "set dominates d at a clock edge");
        set = 1'b0;
      end
      d = 1'($urandom);
      sampled = d;
      @(posedge clk); #1;
      check(sampled, "q follows d");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
