// Exhaustive testbench of the skip detector. For every 3-bit SS and SC
// window, alpha, operand low bits, A_{i+1}, A_{i+2} and allow_skip, the
// value V = SS + SC + x + alpha (mod 8) is formed independently and
//   skip  = allow_skip and V[1] = 0 and A_{i+1} = 0,
//   q^    = V[2] when skipping, else V[1],
//   A^    = A_{i+2} when skipping, else A_{i+1}.
// Only inputs with V[0] = 0 occur in the multiplier; the others are checked
// too, since the rule does not depend on V[0].
module tb_skip_d;
  logic [2:0] ss_win, sc_win, x_lo;
  logic alpha, a1, a2, allow_skip, skip, q_hat, a_hat;
  int checks = 0, failures = 0, skips = 0;

  skip_d dut (.*);

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      int vv;
      logic es, eq, ea;
      {ss_win, sc_win, x_lo, alpha, a1, a2, allow_skip} = 13'(v);
      #1;
      vv = (int'(ss_win) + int'(sc_win) + int'(x_lo) + int'(alpha)) % 8;
      es = allow_skip && !a1 && ((vv >> 1) % 2 == 0);
      eq = es ? 1'((vv >> 2) % 2) : 1'((vv >> 1) % 2);
      ea = es ? a2 : a1;
      checks++;
      if (skip != es || q_hat != eq || a_hat != ea) begin
        failures++;
        if (failures < 10) $display("FAIL in=%b: %b%b%b expected %b%b%b", 13'(v), skip, q_hat, a_hat, es, eq, ea);
      end
      if (es) skips++;
    end
    checks++;
    if (skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
