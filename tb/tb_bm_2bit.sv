// tb_bm_2bit: exhaustive self-checking test of the two-bit carry module.
// For all 32 combinations of the two operand bit pairs and c_i the expected
// p_i, g_i and both carries are taken from an integer addition of the 2-bit
// slices: c_{i+1} is bit 1 of a_i + b_i + c_i, c_{i+2} bit 2 of a + b + c_i.
module tb_bm_2bit;
  logic [1:0] a, b;
  logic ci, p, g, c_mid, c_out;
  int checks = 0, failures = 0;

  bm_2bit dut (.a(a), .b(b), .ci(ci), .p(p), .g(g), .c_mid(c_mid), .c_out(c_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int lo, full;
      {ci, b, a} = 5'(v);
      #1;
      lo   = int'(a[0]) + int'(b[0]) + int'(ci);
      full = int'(a) + int'(b) + int'(ci);
      checks += 4;
      if (p !== (a[0] | b[0])) begin failures++; $display("FAIL p a=%b b=%b", a, b); end
      if (g !== (a[0] & b[0])) begin failures++; $display("FAIL g a=%b b=%b", a, b); end
      if (c_mid !== (lo >= 2)) begin
        failures++; $display("FAIL c_mid a=%b b=%b ci=%b got %b", a, b, ci, c_mid);
      end
      if (c_out !== (full >= 4)) begin
        failures++; $display("FAIL c_out a=%b b=%b ci=%b got %b", a, b, ci, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
