// 16-bit bidirectional thermometer-code shift register of GDI dual-edge
// flip-flops.
//
// The register is four 4-bit slices (gdi_shreg_slice) in a row. Each slice's
// right end takes the first bit of the next slice and its left end the last
// bit of the previous one, so the four act as one 16-bit register. The input
// din enters at bit 1 when shifting right; a constant '0' enters at bit 16
// when shifting left. With din held at '1' the register holds a thermometer
// code: after a reset, each clock edge with dir = DIR_RIGHT adds one '1' at
// the low end of the run of ones and each edge with dir = DIR_LEFT removes
// one. Since every flip-flop is dual-edge, an empty register fills in 16
// edges, i.e. 8 clock periods.
//
// Interface: clk; rst clears and set presets all 16 bits, at once and without
// a clock edge (rst wins); dir selects the direction; din is the serial input
// at bit 1; q[0] is bit 1 (Q<1>) and q[N-1] is bit 16. dir and din must be
// steady around each clock edge.
//
// The 16-bit size, the split into four 4-bit slices, the signal set (In, clk,
// rst, set, shift direction) and the outputs q1..q16 follow the published
// schematic. How the slices are wired to each other, the constant '0' at the
// right end and the encoding of dir are this design's choices.
//
// The combinational loops that tools report between neighbouring bits, within
// and across slices, go through the storage latches of the dual-edge
// flip-flops and are never transparent end to end (see gdi_shreg_slice).
module gdi_shreg16 #(
  parameter int unsigned SLICES      = 4,
  parameter int unsigned SLICE_WIDTH = 4,
  localparam int unsigned N          = SLICES * SLICE_WIDTH
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         set,
  input  logic         dir,
  input  logic         din,
  output logic [N-1:0] q
);

  // Serial input from the left of each slice and from the right of each.
  logic [SLICES-1:0] left_in;
  logic [SLICES-1:0] right_in;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    if (s == 0) begin : g_first
      assign left_in[s] = din;
    end else begin : g_mid_l
      assign left_in[s] = q[s*SLICE_WIDTH-1];
    end
    if (s == SLICES - 1) begin : g_last
      assign right_in[s] = gdi_pkg::FILL_RIGHT;
    end else begin : g_mid_r
      assign right_in[s] = q[(s+1)*SLICE_WIDTH];
    end

    gdi_shreg_slice #(
      .WIDTH(SLICE_WIDTH)
    ) u_slice (
      .clk    (clk),
      .rst    (rst),
      .set    (set),
      .dir    (dir),
      .d_left (left_in[s]),
      .d_right(right_in[s]),
      .q      (q[s*SLICE_WIDTH +: SLICE_WIDTH])
    );
  end

endmodule
