// poly_pkg: types shared by the polymorphic NAND/XOR gate and the
// seven/five-state counter built from it.
//
// poly_mode_e names the level of the gate's function-switching input:
// low selects NAND, high selects XOR (this polarity is the one the gate is
// defined with). cnt_state_t is the counter's three flip-flop outputs in
// the order the transition diagram writes its states, "ABC", so bit 2 is A
// and bit 0 is C. RESET_STATE is 3'b111, which follows from every flip-flop's
// Set pin being tied to the reset line.
package poly_pkg;

  typedef enum logic {
    MODE_NAND = 1'b0,
    MODE_XOR  = 1'b1
  } poly_mode_e;

  typedef struct packed {
    logic a;
    logic b;
    logic c;
  } cnt_state_t;

  localparam cnt_state_t RESET_STATE = 3'b111;

endpackage
