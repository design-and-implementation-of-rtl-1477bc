// bm_2bit: two-bit carry module of the majority-gate ripple adder.
//
// One module covers bit positions i and i+1 and is built from six three-input
// majority gates (mg):
//   p_i     = M(a_i, b_i, 1)            propagate, a_i OR b_i
//   g_i     = M(a_i, b_i, 0)            generate,  a_i AND b_i
//   t_p     = M(a_{i+1}, b_{i+1}, p_i)
//   t_g     = M(a_{i+1}, b_{i+1}, g_i)
//   c_{i+2} = M(t_p, t_g, c_i)
//   c_{i+1} = M(p_i, g_i, c_i)          = g_i + p_i c_i
// The identity M(x, y, M(u, v, w)) = M(M(x, y, u), M(x, y, v), w) lets c_{i+2}
// wait for only one majority gate after c_i arrives, so the carry crosses two
// bit positions per gate delay along the chain.
//
// Interface: a/b are the operand bits {i+1, i}; ci is c_i. Outputs p and g
// (p_i, g_i) are reused by the sum block; c_mid is c_{i+1}, c_out is c_{i+2}.
// Timing: combinational. Gate structure as published; port names are this
// design's own.
module bm_2bit (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       ci,
  output logic       p,
  output logic       g,
  output logic       c_mid,
  output logic       c_out
);
  logic t_p, t_g;

  mg u_p   (.a(a[0]), .b(b[0]), .c(1'b1), .m(p));
  mg u_g   (.a(a[0]), .b(b[0]), .c(1'b0), .m(g));
  mg u_tp  (.a(a[1]), .b(b[1]), .c(p),    .m(t_p));
  mg u_tg  (.a(a[1]), .b(b[1]), .c(g),    .m(t_g));
  mg u_c2  (.a(t_p),  .b(t_g),  .c(ci),   .m(c_out));
  mg u_c1  (.a(p),    .b(g),    .c(ci),   .m(c_mid));
endmodule
