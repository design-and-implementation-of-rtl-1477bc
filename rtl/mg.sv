// mg: three-input majority gate, the basic logic element of quantum-dot
// cellular automata (QCA).
//
// Function: m = M(a,b,c) = ab + bc + ca. Fixing one input to 0 turns the gate
// into a two-input AND, fixing it to 1 into a two-input OR; the adder uses both
// forms. In QCA the gate is a cross of five cells whose centre cell settles to
// the polarisation held by most of its three input neighbours; here it is the
// same Boolean function as plain combinational logic.
//
// Interface: three 1-bit inputs, one 1-bit output. Timing: combinational, no
// clock. The name and the function follow the published adder; modelling the
// gate without QCA clock zones is this implementation's choice.
module mg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);
  assign m = (a & b) | (b & c) | (c & a);
endmodule
