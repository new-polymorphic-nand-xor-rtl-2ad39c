// poly_nand_xor: two-input polymorphic gate with a mode input.
//
// The gate computes NAND(in_a, in_b) while in_c is low and XOR(in_a, in_b)
// while in_c is high. in_c is meant to be a slowly changing mode line shared
// by every polymorphic gate of a circuit, driven either by a level detector
// (supply voltage, temperature) or by a reconfiguration request.
//
// The reference cell is a nine-transistor CMOS circuit with a full
// complementary output stage. Its transistor network and sizing have no
// meaning in RTL, so this module models the logic function only: it is
// purely combinational, with no clock and no latency. The function and the
// mode polarity follow the cell's definition; how the function is expressed
// here is this design's own choice. Both functions are symmetric in in_a and
// in_b, so the two data inputs may be swapped freely.
module poly_nand_xor
  import poly_pkg::*;
(
  input  logic in_a,   // logic variable
  input  logic in_b,   // logic variable
  input  logic in_c,   // function select: 0 = NAND, 1 = XOR
  output logic out
);

  poly_mode_e mode;

  always_comb begin
    mode = poly_mode_e'(in_c);
    unique case (mode)
      MODE_NAND: out = ~(in_a & in_b);
      MODE_XOR:  out = in_a ^ in_b;
      default:   out = ~(in_a & in_b);
    endcase
  end

endmodule
