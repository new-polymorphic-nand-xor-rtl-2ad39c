// poly_counter: seven/five-state counter built from polymorphic gates.
//
// Three D flip-flops hold the state, named C, B and A from left to right in
// the schematic and written "ABC" in the transition diagram (cnt_state_t,
// A is bit 2). On each rising clock edge:
//   C <= A
//   B <= G(C, B)
//   A <= G(B, A)
// where G is a polymorphic gate whose function is chosen by the shared mode
// line: NAND for mode = 0, XOR for mode = 1. No other logic is needed to
// change the counter's behaviour; only the gate function changes.
//
// In XOR mode the counter runs through seven states,
//   111 -> 001 -> 010 -> 110 -> 011 -> 100 -> 101 -> 111,
// and in NAND mode it skips 010 and 101, running through five:
//   111 -> 001 -> 110 -> 011 -> 100 -> 111.
// Only 001 and 100 have a successor that depends on the mode. From 010 and
// 101 the next state is 110 and 111 in either mode, so switching the mode at
// any time keeps the counter on its cycle. State 000 lies on neither cycle
// (in XOR mode it would hold; in NAND mode it leads to 110); reset keeps the
// counter away from it.
//
// reset drives the set pins of all three flip-flops (asynchronous, active
// high in this design) and so loads 111. The structure, the gate wiring and
// the reset-to-set connection follow the reference schematic; the clock edge
// and reset polarity are this design's choices.
//
// Ports: clk, reset, mode (poly_mode_e level, 0 = NAND/five states,
// 1 = XOR/seven states); state is the registered state, one new value per
// clock, with the individual flip-flop outputs also brought out as a, b, c.
module poly_counter
  import poly_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       mode,
  output cnt_state_t state,
  output logic       a,
  output logic       b,
  output logic       c
);

  logic d_b;  // output of the gate between flip-flops C and B
  logic d_a;  // output of the gate between flip-flops B and A

  dff_set u_ff_c (.clk(clk), .set(reset), .d(a),   .q(c));
  dff_set u_ff_b (.clk(clk), .set(reset), .d(d_b), .q(b));
  dff_set u_ff_a (.clk(clk), .set(reset), .d(d_a), .q(a));

  poly_nand_xor u_gate_cb (.in_a(c), .in_b(b), .in_c(mode), .out(d_b));
  poly_nand_xor u_gate_ba (.in_a(b), .in_b(a), .in_c(mode), .out(d_a));

  always_comb begin
    state.a = a;
    state.b = b;
    state.c = c;
  end

  // Once out of reset the counter never reaches 000, which lies outside
  // both cycles. Lint notes that reset is used both as the flip-flops'
  // asynchronous set and, here, sampled on the clock; the assertion adds
  // no logic.
  a_never_zero:  assert property (@(posedge clk) disable iff (reset) state != 3'b000);

endmodule
