// GDI two-input multiplexer.
//
// In Gate Diffusion Input style the multiplexer is one PMOS/NMOS pair whose
// common gate is the select S and whose diffusions carry the data: input A
// sits on the PMOS side and is passed while S is low, input B sits on the
// NMOS side and is passed while S is high. The two-transistor cell is not
// full-swing for every input combination; at the logic level modelled here it
// is the function y = s ? b : a.
//
// Interface: a (D0), b (D1), s (select), y. Purely combinational, no timing.
//
// The pin names A, B, S and the PMOS/NMOS placement follow the published
// cell. This cell is the only logic element of the register: the flip-flop
// and the direction steering are built from it.
module gdi_mux2 (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic y
);

  always_comb begin
    if (s) y = b;
    else   y = a;
  end

endmodule
