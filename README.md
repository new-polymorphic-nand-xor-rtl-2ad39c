# Polymorphic NAND/XOR gate and a seven/five-state counter built from it

A *polymorphic* gate has a fixed structure but two logic functions, and
which one it performs depends on a condition: a supply level, a temperature,
or, as here, a dedicated control input. A circuit built from such gates
changes what it does without any multiplexers or extra logic. Every gate just
switches function together.

This RTL models one such gate and one small circuit that uses it:

* **`poly_nand_xor`** is a two-input gate with a third, mode input. With the
  mode input low it is a NAND. With the mode input high it is an XOR.
* **`poly_counter`** is a three-flip-flop counter. Two of these gates are its
  only glue logic. In XOR mode it cycles through seven states. In NAND mode
  it cycles through five, skipping two states. Think of a controller that
  drops two less important steps when the battery is low.

## The gate

| `in_c` | `out` |
|--------|----------------------|
| 0 | `~(in_a & in_b)` (NAND) |
| 1 | `in_a ^ in_b` (XOR) |

The reference cell is a nine-transistor CMOS circuit with a complementary
output stage. That is cheaper than a separate NAND (4 transistors), a
separate XOR (about 6) and a 2:1 multiplexer to choose between them. None of
that circuit can be expressed in two-state RTL. `poly_nand_xor` is therefore
a purely combinational model of the logic function only. It models no
transistor network, supply dependence, static current or delay. Both
functions are symmetric, so `in_a` and `in_b` may be swapped.

The mode input is meant to be one line shared by all polymorphic gates in a
circuit. An on-demand reconfiguration signal can drive it. So can a level
detector watching the supply voltage or temperature. The detector is an
analog part and is not part of this RTL: in `poly_counter` the mode line is
a plain input port.

## The counter

Three D flip-flops hold the state. Call their outputs C, B and A. State
names are written in the order **A B C**, so `state[2]` is A and `state[0]`
is C (`poly_pkg::cnt_state_t`). With G the polymorphic gate, on each rising
clock edge:

```
C <= A
B <= G(C, B)
A <= G(B, A)
```

The resulting state diagram (every arrow is one clock):

```
            XOR mode (7 states)                 NAND mode (5 states)
111 -> 001 -> 010 -> 110 -> 011 -> 100 -> 101 -> 111
111 -> 001 ---------> 110 -> 011 -> 100 --------> 111
```

The subtle points:

* **Only 001 and 100 depend on the mode.** From 001, XOR gives 010 and NAND
  gives 110. From 100, XOR gives 101 and NAND gives 111.
* **The extra states rejoin the short cycle in either mode.** From 010 the
  next state is 110 in both modes. From 101 it is 111 in both modes. So the
  mode can change at any clock, even while the counter is in 010 or 101. The
  counter never leaves the two cycles and needs no resynchronisation.
* **000 is not on either cycle.** In XOR mode it would hold forever. In NAND
  mode it leads to 110. Reset keeps the counter out of it, and an assertion
  in `poly_counter` flags it if it is ever reached after reset.

Reset drives the **set** pins of all three flip-flops, so it loads `111`. That
state lies on both cycles. `dff_set` implements the set as asynchronous and
active high, with priority over the clock.

## Interfaces and timing

`poly_counter` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | state advances on the rising edge |
| `reset` | in | 1 | asynchronous, active high; forces state `111` at once |
| `mode` | in | 1 | 0 = NAND (five states), 1 = XOR (seven states) |
| `state` | out | 3 | `cnt_state_t {a, b, c}` |
| `a`, `b`, `c` | out | 1 | the individual flip-flop outputs |

The counter has one state per clock and no latency beyond the flip-flop. The
mode is sampled at each rising edge through the gates' combinational path.
Change it away from the edge, as with any synchronous input.

## How far to trust it, and what is this design's own choice

What follows the reference circuit:

* the gate's two functions and its mode polarity;
* the counter's structure and which outputs feed which gate;
* reset wired to the flip-flops' set pins;
* the two state cycles.

With the A B C bit order above, the gate equations reproduce every transition
of the reference state diagram. That cross-check is the basis for reading the
schematic this way.

Choices made here, where the reference is silent:

* rising clock edge;
* reset active high and asynchronous;
* the A B C bit order of `cnt_state_t`.

Not modelled: the transistor-level gate (sizing, supply range, static current,
speed) and the supply or temperature detector that would drive `mode`.

## Files

* `rtl/poly_pkg.sv`: the mode enum (`MODE_NAND`, `MODE_XOR`), the state
  struct and the reset state.
* `rtl/poly_nand_xor.sv`: the gate.
* `rtl/dff_set.sv`: D flip-flop with asynchronous set.
* `rtl/poly_counter.sv`: the counter (the top).
* `tb/tb_poly_nand_xor.sv`: exhaustive and random check against a literal
  truth table.
* `tb/tb_dff_set.sv`: data capture, asynchronous set, and set dominating the
  clock.
* `tb/tb_poly_counter.sv`: end-to-end test. It checks every clock against a
  transition table taken from the state diagram. It measures lap lengths (7
  in XOR mode, 5 in NAND mode), switches the mode at random including in the
  extended states, and resets mid-run. It reports how often each mechanism
  occurred and fails if any never did. The counter has no parameters, so
  this is also the full-size test.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_poly_counter \
    rtl/poly_pkg.sv rtl/dff_set.sv rtl/poly_nand_xor.sv rtl/poly_counter.sv \
    tb/tb_poly_counter.sv
./obj_dir/Vtb_poly_counter
```

Use the same command for `tb_poly_nand_xor` (with `rtl/poly_pkg.sv` and
`rtl/poly_nand_xor.sv`) and for `tb_dff_set` (with `rtl/dff_set.sv`). Each
run takes well under a second.
