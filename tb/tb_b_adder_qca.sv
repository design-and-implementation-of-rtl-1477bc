// tb_b_adder_qca: self-checking test of the n-bit majority-gate adder.
// - Widths 2, 4 and 6 are checked exhaustively (every a, b, cin).
// - The default 16-bit adder gets the two operand pairs of the published
//   16-bit simulation, corner cases (all ones, long carry chains, single
//   generate bits at every position) and random operands.
// Expected values come from the simulator's integer addition, {cout, sum} =
// a + b + cin. The circuit is combinational, so each result is sampled one
// time unit after the inputs change.
module tb_b_adder_qca;
  localparam int N = 16;
  int checks = 0, failures = 0;

  logic [N-1:0] a, b, sum;
  logic cin, cout;
  b_adder_qca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [3:0] a4, b4, s4;  logic ci4, co4;
  logic [5:0] a6, b6, s6;  logic ci6, co6;
  b_adder_qca #(.N(2)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  b_adder_qca #(.N(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  b_adder_qca #(.N(6)) dut6 (.a(a6), .b(b6), .cin(ci6), .sum(s6), .cout(co6));

  task automatic check16(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] exp_v;
    a = ta; b = tb_; cin = tc;
    #1;
    exp_v = {1'b0, ta} + {1'b0, tb_} + {{N{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h cin=%b got cout=%b sum=%h expected %h",
               ta, tb_, tc, cout, sum, exp_v);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive small widths.
    for (int v = 0; v < (1 << 5); v++) begin
      {ci2, b2, a2} = 5'(v);
      #1;
      checks++;
      if ({co2, s2} !== 3'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++; $display("FAIL N=2 a=%h b=%h cin=%b", a2, b2, ci2);
      end
    end
    for (int v = 0; v < (1 << 9); v++) begin
      {ci4, b4, a4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++; $display("FAIL N=4 a=%h b=%h cin=%b", a4, b4, ci4);
      end
    end
    for (int v = 0; v < (1 << 13); v++) begin
      {ci6, b6, a6} = 13'(v);
      #1;
      checks++;
      if ({co6, s6} !== 7'(int'(a6) + int'(b6) + int'(ci6))) begin
        failures++; $display("FAIL N=6 a=%h b=%h cin=%b", a6, b6, ci6);
      end
    end

    // The operand pairs of the published 16-bit simulation (carry in 0).
    check16(16'b1111111111111111, 16'b1100000000000111, 1'b0);
    check16(16'b1111111100000000, 16'b1111110000000000, 1'b0);
    // That second pair is printed with its result: sum 1111101100000000, cout 1.
    checks++;
    if (sum !== 16'b1111101100000000 || cout !== 1'b1) begin
      failures++; $display("FAIL published vector: sum=%b cout=%b", sum, cout);
    end

    // Corner cases.
    check16('1, '1, 1'b1);
    check16('1, '0, 1'b1);
    check16('0, '0, 1'b0);
    check16('1, 16'h0001, 1'b0);
    for (int i = 0; i < N; i++) begin
      check16(16'(1) << i, 16'(1) << i, 1'b0);
      check16(~(16'(1) << i), 16'(1), 1'b0);
      check16(16'hAAAA, 16'h5555, 1'(i));
    end

    // Random operands.
    for (int t = 0; t < 5000; t++)
      check16(N'($urandom), N'($urandom), 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
