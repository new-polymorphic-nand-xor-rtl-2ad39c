// tb_poly_counter: end-to-end test of the seven/five-state counter.
//
// The expected next state comes from a transition table written from the
// counter's state diagram (next_expected below), not from the gate
// equations. The test
//   1. checks that reset loads 111 at once and holds it across clock edges,
//   2. runs three laps in XOR mode and checks a lap length of 7 clocks,
//   3. runs three laps in NAND mode and checks a lap length of 5 clocks,
//   4. changes the mode at random between clock edges for 600 clocks,
//      including while the counter sits in an extended state (010, 101),
//   5. resets in the middle of a run.
// Every clock edge is checked against the table, and the state must never
// be 000. It counts how often each mechanism happened (XOR branch, NAND skip,
// leaving an extended state in each mode, mode switch, reset) and counts a
// failure for any that never happened. The counter has no parameters, so
// this is also the full-size test.
module tb_poly_counter;

  import poly_pkg::*;

  logic       clk = 1'b0;
  logic       reset;
  logic       mode;
  cnt_state_t state;
  logic       a, b, c;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  int n_xor_branch   = 0;  // 001->010 or 100->101
  int n_nand_skip    = 0;  // 001->110 or 100->111
  int n_ext_exit_xor = 0;  // leaving 010/101 with mode = XOR
  int n_ext_exit_nand= 0;  // leaving 010/101 with mode = NAND
  int n_mode_switch  = 0;
  int n_reset        = 0;

  poly_counter dut (
    .clk(clk), .reset(reset), .mode(mode),
    .state(state), .a(a), .b(b), .c(c)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Transition table of the state diagram ("ABC" order).
  function automatic logic [2:0] next_expected(input logic [2:0] s, input logic m);
    case (s)
      3'b111:  return 3'b001;
      3'b001:  return m ? 3'b010 : 3'b110;
      3'b010:  return 3'b110;
      3'b110:  return 3'b011;
      3'b011:  return 3'b100;
      3'b100:  return m ? 3'b101 : 3'b111;
      3'b101:  return 3'b111;
      default: return 3'bxxx;  // not on the diagram
    endcase
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d, state=%03b)", what, cycles, state);
    end
  endtask

  // One clock: mode is set at the falling edge, the state is checked just
  // after the rising edge.
  task automatic step(input logic m);
    logic [2:0] prev, expected;
    @(negedge clk);
    if (m !== mode) n_mode_switch++;
    mode = m;
    prev   = state;
    expected = next_expected(prev, m);
    @(posedge clk); #1;
    check(state == expected, $sformatf("transition %03b -(mode %0b)-> %03b", prev, m, expected));
    check(state != 3'b000, "state 000 reached");
    check({a, b, c} == state, "a/b/c outputs agree with state");
    if ((prev == 3'b001 || prev == 3'b100) && m)  n_xor_branch++;
    if ((prev == 3'b001 || prev == 3'b100) && !m) n_nand_skip++;
    if ((prev == 3'b010 || prev == 3'b101) && m)  n_ext_exit_xor++;
    if ((prev == 3'b010 || prev == 3'b101) && !m) n_ext_exit_nand++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset = 1'b1;
    #1;
    check(state == RESET_STATE, "reset loads 111 without a clock edge");
    @(posedge clk); #1;
    check(state == RESET_STATE, "state held at 111 during reset");
    reset = 1'b0;
    n_reset++;
  endtask

  // Runs `laps` laps in one mode starting from 111, checking each lap length.
  task automatic laps(input logic m, input int nlaps, input int want_len);
    for (int l = 0; l < nlaps; l++) begin
      int len = 0;
      do begin
        step(m);
        len++;
      end while (state != 3'b111 && len < 20);
      check(len == want_len, $sformatf("lap length %0d in mode %0b, expected %0d", len, m, want_len));
    end
  endtask

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    mode  = MODE_XOR;
    repeat (2) @(posedge clk);
    #1;
    check(state == RESET_STATE, "state is 111 after reset");
    reset = 1'b0;
    n_reset++;

    laps(MODE_XOR, 3, 7);
    laps(MODE_NAND, 3, 5);

    for (int i = 0; i < 600; i++) begin
      step(1'($urandom));
      if (i == 300) do_reset();
    end

    // Extended state left in NAND mode, deterministically: reach 010 in XOR
    // mode and switch to NAND for the next clock; same for 101.
    do_reset();
    step(MODE_XOR);   // 111 -> 001
    step(MODE_XOR);   // 001 -> 010
    step(MODE_NAND);  // 010 -> 110
    step(MODE_NAND);  // 110 -> 011
    step(MODE_XOR);   // 011 -> 100
    step(MODE_XOR);   // 100 -> 101
    step(MODE_NAND);  // 101 -> 111

    check(n_xor_branch    > 0, "XOR branch never taken");
    check(n_nand_skip     > 0, "NAND skip never taken");
    check(n_ext_exit_xor  > 0, "extended state never left in XOR mode");
    check(n_ext_exit_nand > 0, "extended state never left in NAND mode");
    check(n_mode_switch   > 0, "mode never switched");
    check(n_reset         > 1, "reset never applied during a run");
    $display("mechanisms: xor_branch=%0d nand_skip=%0d ext_exit_xor=%0d ext_exit_nand=%0d mode_switch=%0d reset=%0d",
             n_xor_branch, n_nand_skip, n_ext_exit_xor, n_ext_exit_nand, n_mode_switch, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
