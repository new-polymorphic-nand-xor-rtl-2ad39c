// dff_set: D-type flip-flop with a set input.
//
// q takes d on each rising edge of clk. While set is high, q is forced to 1
// at once, without waiting for a clock edge. The counter uses three of these
// with their set pins tied to one reset line, so reset puts the counter into
// the all-ones state.
//
// The flip-flop, its D, Q, Clk and Set pins, and the wiring of Set to the
// reset line come from the counter's schematic. The rising clock edge, the
// active-high level of set and its asynchronous action are this design's
// own choices; the schematic does not state them.
module dff_set (
  input  logic clk,
  input  logic set,    // asynchronous, active high: q <= 1
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge set) begin
    if (set) q <= 1'b1;
    else     q <= d;
  end

endmodule
