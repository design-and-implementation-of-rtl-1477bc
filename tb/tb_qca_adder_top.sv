// tb_qca_adder_top: end-to-end test of the whole design at its default
// parameters (16-bit adder plus the five-input majority gate).
//
// Every result is compared with the simulator's integer addition and with a
// count of ones for the majority gate. The testbench also counts how often
// each behaviour of the adder actually occurred and fails if one never did:
//   - a carry generated at bit 0 and propagated through every position to
//     the carry out (the longest path of the ripple chain),
//   - a carry in that changes the result,
//   - a carry out,
//   - a carry killed inside the chain (a_i = b_i = 0 with a carry arriving),
//   - the majority gate deciding 1 and deciding 0.
module tb_qca_adder_top;
  localparam int N = 16;
  logic [N-1:0] a, b, sum;
  logic cin, cout;
  logic [4:0] m5_in;
  logic m5_out;
  int checks = 0, failures = 0;
  int n_full_ripple = 0, n_cin_used = 0, n_cout = 0, n_kill = 0;
  int n_m5_one = 0, n_m5_zero = 0;

  qca_adder_top dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .m5_in(m5_in), .m5_out(m5_out)
  );

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] exp_v, exp_nocin;
    logic [N:0] carry;
    logic full, kill;
    a = ta; b = tb_; cin = tc;
    m5_in = 5'($urandom);
    #1;
    exp_v     = {1'b0, ta} + {1'b0, tb_} + {{N{1'b0}}, tc};
    exp_nocin = {1'b0, ta} + {1'b0, tb_};
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got cout=%b sum=%h expected %h",
               ta, tb_, tc, cout, sum, exp_v);
    end
    // Behaviour counters.
    carry[0] = tc;
    kill = 1'b0;
    for (int i = 0; i < N; i++) begin
      carry[i+1] = (ta[i] & tb_[i]) | ((ta[i] | tb_[i]) & carry[i]);
      if (carry[i] && !ta[i] && !tb_[i]) kill = 1'b1;
    end
    full = !tc && ta[0] && tb_[0];
    for (int i = 1; i < N; i++) if (!(ta[i] ^ tb_[i])) full = 1'b0;
    if (full) n_full_ripple++;
    if (exp_v != exp_nocin) n_cin_used++;
    if (exp_v[N]) n_cout++;
    if (kill) n_kill++;
    // Five-input majority gate.
    begin
      int n = 0;
      for (int k = 0; k < 5; k++) n += int'(m5_in[k]);
      checks++;
      if (m5_out !== (n >= 3)) begin
        failures++; $display("FAIL maj5 in=%05b out=%b", m5_in, m5_out);
      end
      if (m5_out) n_m5_one++; else n_m5_zero++;
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
    // One complete addition as published, then the longest carry path.
    apply(16'b1111111111111111, 16'b1100000000000111, 1'b0);
    apply(16'b1111111100000000, 16'b1111110000000000, 1'b0);
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'h7FFF, 16'h8001, 1'b0);
    apply(16'hFFFF, 16'h0000, 1'b1);
    for (int t = 0; t < 20000; t++)
      apply(N'($urandom), N'($urandom), 1'($urandom));

    $display("full ripple=%0d cin used=%0d cout=%0d kill=%0d maj5 one=%0d zero=%0d",
             n_full_ripple, n_cin_used, n_cout, n_kill, n_m5_one, n_m5_zero);
    checks += 6;
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full carry ripple"); end
    if (n_cin_used == 0)    begin failures++; $display("FAIL carry in never mattered"); end
    if (n_cout == 0)        begin failures++; $display("FAIL no carry out"); end
    if (n_kill == 0)        begin failures++; $display("FAIL no carry killed"); end
    if (n_m5_one == 0)      begin failures++; $display("FAIL maj5 never 1"); end
    if (n_m5_zero == 0)     begin failures++; $display("FAIL maj5 never 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
