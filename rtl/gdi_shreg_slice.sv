// Bidirectional thermometer-code shift-register slice of GDI dual-edge
// flip-flops.
//
// Each bit is a gdi_detff whose data input comes from a gdi_mux2 steered by
// the direction input: with dir = DIR_RIGHT a bit loads its left neighbour,
// with dir = DIR_LEFT its right neighbour. The neighbours of the two end bits
// are the slice inputs d_left and d_right, so slices chain into a longer
// register. In a thermometer-code register the far left input is tied to '1'
// and the far right input to '0': shifting right adds a '1' to the run of
// ones, shifting left removes one. Because the flip-flops are dual-edge, the
// contents move one place at every clock edge, rising and falling.
//
// Interface: clk, rst (clear all bits), set (preset all bits), dir, d_left,
// d_right, q. q[0] is the leftmost bit (Q<1>), q[WIDTH-1] the rightmost.
// rst and set act without a clock edge; dir, d_left and d_right must be steady
// around each clock edge. Outputs change right after each edge.
//
// The slice width of 4 and the port set (In, clk, rst, set, shift direction,
// q1..q4) follow the published 4-bit sub-register. The d_right input, which
// a slice needs to take a bit from its right neighbour when shifting left, and
// the encoding of dir are this design's own choices.
//
// Lint and synthesis tools report a combinational loop here: bit i feeds bit
// i+1 through its direction mux and bit i+1 feeds bit i back. The loop is not
// real. Only one of the two paths is selected by dir at a time, and each path
// runs through a latch of the next flip-flop that is transparent in one clock
// phase while the output mux of that flip-flop shows it only in the other.
module gdi_shreg_slice #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             set,
  input  logic             dir,
  input  logic             d_left,
  input  logic             d_right,
  output logic [WIDTH-1:0] q
);

  // Left and right neighbour of every bit, ends included.
  logic [WIDTH+1:0] chain;
  logic [WIDTH-1:0] d;

  assign chain = {d_right, q, d_left};

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // a (dir = 0, left shift): right neighbour; b (dir = 1, right shift):
    // left neighbour.
    gdi_mux2 u_dir_mux (
      .a(chain[i+2]),
      .b(chain[i]),
      .s(dir),
      .y(d[i])
    );

    gdi_detff u_ff (
      .clk(clk),
      .rst(rst),
      .set(set),
      .d  (d[i]),
      .q  (q[i])
    );
  end

endmodule
