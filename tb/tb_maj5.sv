// tb_maj5: exhaustive self-checking test of the five-input majority gate.
// The inputs step through all 32 combinations as binary counting, A the
// fastest, in the manner of a QCA simulation sweep; the expected output is
// "three or more inputs are 1", computed by counting ones.
module tb_maj5;
  logic [4:0] in;
  logic f;
  int checks = 0, failures = 0;
  int ones_seen = 0, zeros_seen = 0;

  maj5 dut (.in(in), .f(f));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int n;
      in = 5'(v);
      #1;
      n = 0;
      for (int k = 0; k < 5; k++) n += int'(in[k]);
      checks++;
      if (f !== (n >= 3)) begin
        failures++;
        $display("FAIL in=%05b f=%0b", in, f);
      end
      if (f) ones_seen++; else zeros_seen++;
    end
    checks++;
    if (ones_seen != 16 || zeros_seen != 16) begin
      failures++;
      $display("FAIL output 1 for %0d of 32 inputs, expected 16", ones_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
