# 16-bit bidirectional thermometer-code shift register of GDI dual-edge flip-flops

A thermometer-code shift register stores a count as a run of ones: a value of
k is held as k ones at the low end followed by zeros. Counting up shifts the
register towards higher bits with a '1' entering at bit 1; counting down
shifts it towards lower bits with a '0' entering at bit 16. Such registers sit
in column drivers, image sensors and similar circuits where the register
is long, clocked all the time and dominates the power of the block.

This design lowers the clock cost with two ideas:

* **Dual-edge flip-flops.** Every storage element takes data on the rising
  *and* on the falling clock edge, so the register moves one place per edge.
  For the same shift rate the clock runs at half the frequency of a
  single-edge design, which halves the clock network's switching.
* **Gate Diffusion Input (GDI) multiplexers as the only logic cell.** A GDI
  2:1 multiplexer is one PMOS/NMOS pair with the select on the common gate
  and the data on the diffusions. The flip-flop, and the steering that picks
  the shift direction, are all built from this cell.

The RTL here describes that structure at logic level: latches and
multiplexers, with the same hierarchy as the circuit. It simulates with
Verilator and synthesizes, but it does not model what the GDI style is for
(transistor count, reduced swing, power). Those are properties of the
transistor-level cells, not of the logic.

## The GDI multiplexer (`rtl/gdi_mux2.sv`)

Pins A, B and S. S drives the gates of both transistors. A is on the PMOS
side and is passed while S is low; B is on the NMOS side and is passed while
S is high. As logic this is `y = s ? b : a`. In the flip-flop symbols, A is
the D0 pin and B the D1 pin.

## The dual-edge flip-flop (`rtl/gdi_detff.sv`)

This is the part that needs the most care to read. It is three GDI
multiplexers and one inverter:

```
            +-----------+
  d ------->| D1        |
       +--->| D0  Mux_1 |--+------------------+
       |    |  S0 = clk |  |                  |    +-------------+
       +----------------+--+ lat_hi           +--->| D0          |
                                                   |   Mux_3     |---> q
            +-----------+                     +--->| D1          |
  d ------->| D1        |                     |    |  S0 = clk   |
       +--->| D0  Mux_2 |--+------------------+    +-------------+
       |    | S0 = ~clk |  |
       +----------------+--+ lat_lo
```

* A multiplexer whose output is fed back into its D0 input is a latch: while
  the select is 1 it passes d, while it is 0 it keeps its output.
* `lat_hi` (Mux_1) is transparent while clk is high and holds while clk is
  low. `lat_lo` (Mux_2, selected by the inverted clock) is transparent while
  clk is low and holds while clk is high.
* The output multiplexer, also selected by clk, always shows the latch that
  is *holding*: `lat_hi` while clk is low, `lat_lo` while clk is high.

At a rising edge `lat_lo` closes on the current d and, in the same instant,
the output switches to it. At a falling edge `lat_hi` does the same. So q
takes d at every edge and is stable between edges: a D flip-flop that
triggers on both edges, with setup and hold requirements at both.

`rst` and `set` (active high, asynchronous, `rst` wins) act on both latches.
The published flip-flop has neither; they were added because the register
built from it has clear and preset inputs.

**Tools report latches and combinational loops.** The 32 latches are the
storage of the 16 flip-flops and are meant to be there. The loops go from
one bit through its neighbour and back. They never conduct: each passes
through a latch that is open in one clock phase while the output multiplexer
after it shows that latch only in the other phase. On top of that, the
direction multiplexer selects only one neighbour at a time.

## The 4-bit slice (`rtl/gdi_shreg_slice.sv`)

Each bit is a `gdi_detff` whose d comes from a `gdi_mux2` steered by `dir`:

* `dir = 1`: shift right. Bit i loads bit i-1, and bit 0 loads `d_left`.
* `dir = 0`: shift left. Bit i loads bit i+1, and bit WIDTH-1 loads `d_right`.

`q[0]` is the leftmost bit. The slice has both `d_left` and `d_right` so that
slices can be chained for both directions.

## The 16-bit register (`rtl/gdi_shreg16.sv`, top)

Four slices in a row. Slice s takes `d_left` from the last bit of slice s-1
and `d_right` from the first bit of slice s+1. The outer ends are the input
`din` on the left and a constant '0' on the right. `gdi_pkg` holds the
direction and fill constants.

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `clk` | in  | 1  | clock; the register moves at both edges |
| `rst` | in  | 1  | clears all bits at once, no clock edge needed |
| `set` | in  | 1  | presets all bits to 1 at once; `rst` wins |
| `dir` | in  | 1  | 1 = right (count up), 0 = left (count down) |
| `din` | in  | 1  | enters at bit 1 on right shifts; tie to 1 for thermometer use |
| `q`   | out | 16 | `q[0]` is bit 1, `q[15]` is bit 16 |

Parameters: `SLICES = 4`, `SLICE_WIDTH = 4`. Any product works.

### Timing

* One place per clock edge. An empty register with `din = 1` and `dir = 1`
  holds k ones after k edges and is full after 16 edges, which is 8 clock
  periods. With `dir = 0` it empties in 16 edges.
* `dir` and `din` are sampled at both edges. Change them only while clk is
  steady, not at either edge. The clock's duty cycle sets the time available
  to each half-period's shift.
* q changes right after each edge. It also changes at once when `rst` or
  `set` is asserted.

## Where this departs from, or goes beyond, the published circuit

Taken from the published design:

* the GDI multiplexer cell;
* the three-multiplexer-and-inverter dual-edge flip-flop and the select
  polarities of its three multiplexers;
* the 16-bit size, built from four 4-bit sub-registers;
* the input set: data in, clock, reset, set, shift direction.

Choices made here:

* the `rst`/`set` inputs inside the flip-flop, and `rst` winning over `set`;
* the encoding of `dir`;
* the direction multiplexer in front of each bit;
* the `d_right` input of a slice and the order in which slices are chained;
* the constant '0' entering at the right end;
* `din` kept as a port rather than hard-wired to '1'.

The insides of the 4-bit sub-register are not published. This slice is the
classic bidirectional thermometer register, one flip-flop per bit with a
common clock and direction, using the dual-edge flip-flop.

The published evaluation compares this register against a latch-based
design. That design has two-phase odd/even latch clocks from a
flip-flop-and-gates clock generator. It is a baseline and is not
included here. The published power and area results are transistor-level
numbers and are not reproduced by this RTL. The 48 mW versus 108 mW power
and the 422 versus 474 circuit nodes are those numbers.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_gdi_mux2`: all eight input combinations.
* `tb_gdi_detff`: 400 random values. d is wiggled between edges to check
  that q holds, and capture is checked after every edge, with rising-edge
  and falling-edge captures counted separately. Asynchronous reset and set
  are checked in both clock phases, and so is reset winning over set.
* `tb_gdi_shreg_slice`: the slice against a reference model. The model
  shifts at every edge. Random direction and end inputs are used, with
  random asynchronous reset and set.
* `tb_gdi_shreg16`: the full 16-bit register at its default size. It first
  fills from empty with the level checked after every edge. It must be full
  after exactly 16 edges, that is 8 clock periods. It then drains in 16
  edges. Then comes a random up/down walk of the level, then random data,
  direction, reset and set against a reference model. It counts, and
  requires, right and left shifts, shifts on both edges, reset, set, a full
  and an empty register, and a '1' crossing a slice boundary in each
  direction.

Inputs in the testbenches change 2 time units after a clock edge (period 10),
and outputs are compared 2 units after the next edge. This keeps data away
from the edges, which a zero-delay latch model needs: at the edge itself the
flip-flop, like the circuit, has a hold requirement.

## Simulating

```
verilator --binary --timing -Wno-fatal --top-module tb_gdi_shreg16 \
    rtl/gdi_pkg.sv rtl/gdi_mux2.sv rtl/gdi_detff.sv \
    rtl/gdi_shreg_slice.sv rtl/gdi_shreg16.sv tb/tb_gdi_shreg16.sv
./obj_dir/Vtb_gdi_shreg16
```

The same pattern works for the other testbenches with their own files.
Verilator prints `UNOPTFLAT` warnings for the loops explained above, so
`-Wno-fatal` is needed. The warnings do not affect the result: Verilator
iterates the loop until it settles.
