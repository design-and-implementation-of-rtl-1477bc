// sum_bit: one column of the majority-gate sum block.
//
// With x, y the two operand bits of position i (or, equivalently, its
// propagate/generate pair, since M(p, g, z) = M(a, b, z)), c_in = c_i and
// c_nxt = c_{i+1} the carry already produced by the carry chain:
//   n   = NOT c_{i+1}                   the QCA inverter
//   t   = M(x, y, n)
//   s_i = M(t, n, c_i)
// This is the full-adder sum without any XOR: it is 1 when an odd number of
// x, y, c_i are 1.
//
// Interface: 1-bit x, y, c_in, c_nxt; output s. Timing: combinational.
// Structure as published; port names are this design's own.
module sum_bit (
  input  logic x,
  input  logic y,
  input  logic c_in,
  input  logic c_nxt,
  output logic s
);
  logic n, t;

  assign n = ~c_nxt;
  mg u_t (.a(x), .b(y), .c(n),    .m(t));
  mg u_s (.a(t), .b(n), .c(c_in), .m(s));
endmodule
