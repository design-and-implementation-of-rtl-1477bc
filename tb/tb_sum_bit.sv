// tb_sum_bit: exhaustive self-checking test of one sum cell.
// For every x, y, c_i the cell is given the true next carry c_{i+1} (as the
// carry chain would deliver it) and must return the parity x ^ y ^ c_i. The
// same is repeated with (x, y) replaced by the propagate/generate pair
// (x | y, x & y), the form used at even bit positions of the adder.
module tb_sum_bit;
  logic x, y, c_in, c_nxt, s;
  int checks = 0, failures = 0;

  sum_bit dut (.x(x), .y(y), .c_in(c_in), .c_nxt(c_nxt), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int form = 0; form < 2; form++) begin
      for (int v = 0; v < 8; v++) begin
        logic xa, ya;
        int n;
        {c_in, ya, xa} = 3'(v);
        n     = int'(xa) + int'(ya) + int'(c_in);
        c_nxt = (n >= 2);
        if (form == 0) begin x = xa; y = ya; end
        else begin x = xa | ya; y = xa & ya; end
        #1;
        checks++;
        if (s !== n[0]) begin
          failures++;
          $display("FAIL form=%0d a=%b b=%b ci=%b s=%b", form, xa, ya, c_in, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
