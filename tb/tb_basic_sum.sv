// tb_basic_sum: self-checking test of the sum block at its default width.
// Random operands and carry in are drawn; the carries c[N:0] are worked out
// bit by bit in the testbench and fed in, as the carry chain would. Each
// column gets either (a_i, b_i) or (a_i | b_i, a_i & b_i) at random. The sum
// must equal the low N bits of a + b + cin.
module tb_basic_sum;
  localparam int N = 16;
  logic [N-1:0] x, y, s, a, b;
  logic [N:0] c;
  logic [N-1:0] expected;
  int checks = 0, failures = 0;

  basic_sum dut (.x(x), .y(y), .c(c), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] form;
      a    = N'($urandom);
      b    = N'($urandom);
      form = N'($urandom);
      c[0] = 1'($urandom);
      for (int i = 0; i < N; i++) begin
        c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
        x[i]   = form[i] ? (a[i] | b[i]) : a[i];
        y[i]   = form[i] ? (a[i] & b[i]) : b[i];
      end
      expected = a + b + {{(N-1){1'b0}}, c[0]};
      #1;
      checks++;
      if (s !== expected) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b s=%h expected %h", a, b, c[0], s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
