// tb_poly_nand_xor: self-checking test of the polymorphic NAND/XOR gate.
//
// Applies all eight input combinations in a fixed order and then 200 random
// ones, and compares the output with a truth table written out literally
// below (indexed by {in_c, in_a, in_b}). The gate is combinational, so every
// check is made 1 ns after the inputs change, i.e. within the same cycle.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_poly_nand_xor;

  logic in_a, in_b, in_c, out;
  int   checks   = 0;
  int   failures = 0;

  poly_nand_xor dut (.in_a(in_a), .in_b(in_b), .in_c(in_c), .out(out));

  //                 c a b :  000 001 010 011 100 101 110 111
  // NAND (c=0): 1 1 1 0 ; XOR (c=1): 0 1 1 0
  localparam logic [7:0] TRUTH = 8'b0110_0111;  // bit index = {c,a,b}

  task automatic apply(input logic c, input logic a, input logic b);
    logic expected;
    in_c = c; in_a = a; in_b = b;
    #1;
    expected = TRUTH[{c, a, b}];
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL c=%0b a=%0b b=%0b out=%0b expected=%0b", c, a, b, out, expected);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) apply(i[2], i[1], i[0]);
    for (int i = 0; i < 200; i++) begin
      int unsigned r;
      r = $urandom;
      apply(r[0], r[1], r[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
