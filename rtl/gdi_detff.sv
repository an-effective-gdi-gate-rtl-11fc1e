// Dual-edge-triggered D flip-flop built from three GDI multiplexers.
//
// How it works: two multiplexers each feed their own output back to one data
// input, which makes each of them a level-sensitive latch. The first latch
// (Mux2_1) is transparent while clk is high and holds while it is low; the
// second (Mux2_2) gets the inverted clock from INV_1 and is transparent while
// clk is low. The output multiplexer (Mux2_3), selected by clk, always shows
// the latch that is currently holding: at a rising edge the low-phase latch
// closes on d and is switched to q, at a falling edge the high-phase latch
// closes on d and is switched to q. So q takes the value of d at every clock
// edge, both rising and falling, and is stable in between. Data moves once per
// half clock period while the clock itself runs at half the rate of an
// equivalent single-edge design.
//
// Interface: clk, d, q, plus active-high rst (q -> 0) and set (q -> 1). rst
// and set act at once, without a clock edge, and rst wins over set; d must be
// steady around each clock edge (setup/hold to both edges).
//
// The three-multiplexer-and-inverter structure and the select polarities of
// Mux2_1..Mux2_3 follow the published schematic. The rst and set inputs are
// this design's addition: the schematic has none, but the shift register that
// uses the flip-flop is cleared and preset by Reset and Set signals, so they
// are placed on the two storage latches here.
//
// The two latches are intentional: they are the storage of the flip-flop, and
// tools report them as latches.
// Tools that follow the latches as transparent paths also report loops
// through them in registers built from this flip-flop: from d to q the path
// is open only through a latch that is closed at that moment, so no loop is
// ever transparent.
module gdi_detff (
  input  logic clk,
  input  logic rst,
  input  logic set,
  input  logic d,
  output logic q
);

  logic clk_n;     // INV_1
  logic lat_hi;    // Mux2_1 output: open while clk = 1
  logic lat_lo;    // Mux2_2 output: open while clk = 0

  assign clk_n = ~clk;

  // Mux2_1: D1 = d, D0 = its own output, S0 = clk.
  always_latch begin
    if (rst)      lat_hi = 1'b0;
    else if (set) lat_hi = 1'b1;
    else if (clk) lat_hi = d;
  end

  // Mux2_2: D1 = d, D0 = its own output, S0 = clk_n.
  always_latch begin
    if (rst)        lat_lo = 1'b0;
    else if (set)   lat_lo = 1'b1;
    else if (clk_n) lat_lo = d;
  end

  // Mux2_3: D0 = Mux2_1 (holding while clk = 0), D1 = Mux2_2 (holding while
  // clk = 1), S0 = clk.
  gdi_mux2 u_mux_out (
    .a(lat_hi),
    .b(lat_lo),
    .s(clk),
    .y(q)
  );

endmodule
