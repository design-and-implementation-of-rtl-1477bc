// tb_mg: exhaustive self-checking test of the three-input majority gate.
// All eight input combinations are applied; the expected output is 1 when at
// least two inputs are 1, counted independently of the gate's expression. The
// AND (c = 0) and OR (c = 1) uses of the gate are checked explicitly as well.
module tb_mg;
  logic a, b, c, m;
  int checks = 0, failures = 0;

  mg dut (.a(a), .b(b), .c(c), .m(m));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = 3'(v);
      #1;
      checks++;
      if (m !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b m=%0b", a, b, c, m);
      end
      checks++;
      if (c == 1'b0 && m !== (a && b)) begin
        failures++;
        $display("FAIL AND form a=%0b b=%0b m=%0b", a, b, m);
      end else if (c == 1'b1 && m !== (a || b)) begin
        failures++;
        $display("FAIL OR form a=%0b b=%0b m=%0b", a, b, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
