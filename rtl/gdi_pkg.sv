// Shared constants of the GDI thermometer-code shift register.
//
// The register moves its contents one place per clock edge, towards the
// right (a '1' enters at bit 1, the thermometer grows) or towards the left
// (a '0' enters at the last bit, the thermometer shrinks). The direction
// input selects which. The encoding of that input (1 = right) is a choice of
// this design; the figures only name the signal.
package gdi_pkg;

  // Level of the direction input.
  localparam logic DIR_RIGHT = 1'b1;  // shift towards higher bit numbers, fill '1'
  localparam logic DIR_LEFT  = 1'b0;  // shift towards lower bit numbers, fill '0'

  // Values that enter at the two ends of a thermometer-code register.
  localparam logic FILL_LEFT  = 1'b1;
  localparam logic FILL_RIGHT = 1'b0;

endpackage
