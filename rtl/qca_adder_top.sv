// qca_adder_top: the two majority-logic designs of the QCA adder work, side
// by side.
//
// - u_adder: the n-bit ripple adder of three-input majority gates
//   (b_adder_qca), with ports a, b, cin, sum, cout.
// - u_maj5: the stand-alone five-input majority gate (maj5), with ports
//   m5_in (A..E, bit 0 = A) and m5_out.
// The published work proposes both but never places the five-input gate
// inside the adder, so the two share no signal here.
//
// Parameters: N, the adder width, default 16 as published (even, >= 2).
// Timing: purely combinational; there is no clock or reset.
module qca_adder_top #(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  input  logic [4:0]   m5_in,
  output logic         m5_out
);
  b_adder_qca #(.N(N)) u_adder (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum),
    .cout(cout)
  );

  maj5 u_maj5 (.in(m5_in), .f(m5_out));
endmodule
