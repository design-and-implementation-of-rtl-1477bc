// maj5: five-input majority gate.
//
// Function: f = 1 when three or more of the five inputs A..E are 1, i.e. the
// sum of the ten three-input products
//   ABC + ABD + ABE + ACD + ACE + ADE + BCD + BCE + BDE + CDE.
// In QCA it is built as a two-layer cross: A, B, C enter the centre cell in
// one layer, D and E reach it from the layer above and below, and the output X
// leaves on the fourth side. The logic is written here directly as the ten
// products above.
//
// Interface: in[4:0] carries A..E with bit 0 = A; f is the output.
// Timing: combinational, no clock. The function and input names follow the
// published gate; the bit order of the input vector is this design's choice.
module maj5 (
  input  logic [4:0] in,
  output logic       f
);
  logic a, b, c, d, e;
  assign {e, d, c, b, a} = in;

  assign f = (a & b & c) | (a & b & d) | (a & b & e) | (a & c & d) |
             (a & c & e) | (a & d & e) | (b & c & d) | (b & c & e) |
             (b & d & e) | (c & d & e);
endmodule
