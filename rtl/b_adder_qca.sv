// b_adder_qca: n-bit binary adder built only from three-input majority gates
// and inverters, the structure proposed for quantum-dot cellular automata.
//
// How it works. The carry chain handles two bit positions per module. At the
// least significant end two plain majority gates give c_1 = M(a_0, b_0, cin)
// and c_2 = M(a_1, b_1, c_1). Every further pair (i, i+1), i = 2, 4, ..., N-2,
// is a bm_2bit module that forms p_i, g_i and both carries c_{i+1}, c_{i+2}
// from c_i; along the chain the carry passes one majority gate per two bits.
// Once all carries are known the sum block (basic_sum) computes every s_i in
// parallel as M(M(x_i, y_i, NOT c_{i+1}), NOT c_{i+1}, c_i). Even positions
// from 2 upwards feed the sum cell with p_i, g_i from the carry chain, the
// others with a_i, b_i; both give the same result.
//
// Interface: a, b, sum are N bits, cin and cout one bit each (cout = c_N).
// N must be even and at least 2; the default 16 is the published width.
// Timing: combinational, no clock or reset.
//
// Own choices: the published QCA layout fixes the carry in to 0 and then
// drops it, turning the least significant gate into g_0 = M(a_0, b_0, 0).
// Here that constant is the cin port, so the same two gates also add a carry
// in; with cin = 0 the circuit is the published one.
module b_adder_qca #(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  if (N < 2 || (N % 2) != 0) begin : g_bad_width
    $error("b_adder_qca: N must be even and at least 2");
  end

  logic [N:0]   c;     // c[i] is the carry into bit position i
  logic [N-1:0] x, y;  // operand pair handed to each sum cell

  assign c[0] = cin;

  // Least significant pair: two majority gates (u1, u2 of the netlist).
  mg u1 (.a(a[0]), .b(b[0]), .c(c[0]), .m(c[1]));
  mg u2 (.a(a[1]), .b(b[1]), .c(c[1]), .m(c[2]));
  assign x[1:0] = a[1:0];
  assign y[1:0] = b[1:0];

  // Remaining pairs: one two-bit carry module each.
  for (genvar k = 1; k < N / 2; k++) begin : g_pair
    localparam int I = 2 * k;
    logic p_i, g_i;

    bm_2bit u_bm (
      .a    (a[I+1:I]),
      .b    (b[I+1:I]),
      .ci   (c[I]),
      .p    (p_i),
      .g    (g_i),
      .c_mid(c[I+1]),
      .c_out(c[I+2])
    );
    assign x[I]   = p_i;
    assign y[I]   = g_i;
    assign x[I+1] = a[I+1];
    assign y[I+1] = b[I+1];
  end

  basic_sum #(.N(N)) u_sum (.x(x), .y(y), .c(c), .s(sum));

  assign cout = c[N];
endmodule
