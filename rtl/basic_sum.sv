// basic_sum: sum block of the n-bit majority-gate adder.
//
// All carries c_N..c_0 come from the carry chain, so the N sum cells (sum_bit,
// an inverter and two majority gates each) work in parallel and add only two
// gate delays after the last carry. Column i gets its operand pair x[i], y[i]
// (a_i, b_i or p_i, g_i), its own carry c[i] and the next carry c[i+1].
//
// Interface: x, y are N bits, c is N+1 bits (c[0] = carry in, c[N] = carry
// out), s is the N-bit sum. Timing: combinational. Structure as published; the
// vector form of the ports is this design's choice.
module basic_sum #(
  parameter int N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N:0]   c,
  output logic [N-1:0] s
);
  for (genvar i = 0; i < N; i++) begin : g_col
    sum_bit u_bit (.x(x[i]), .y(y[i]), .c_in(c[i]), .c_nxt(c[i+1]), .s(s[i]));
  end
endmodule
