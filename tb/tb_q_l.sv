// Testbench of the quotient look-ahead Q_L. A reference pair of flip-flops is
// kept in the testbench: on load, (A, q) = (A_0, A_0 B_0); on each enabled
// cycle, q = ((ss + sc + x) bit 1) xor (A_{i+1} and B_0), A = A_{i+1}.
// Random stimulus over several thousand cycles, with load and enable mixed,
// and a reset at the start.
module tb_q_l;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, a_first, en, a_next, b0;
  logic [1:0] ss_win, sc_win, x_lo;
  logic a_i, q_i;
  logic ea = 1'b0, eq = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  q_l dut (.*);

  initial begin
    {load, a_first, en, a_next, b0, ss_win, sc_win, x_lo} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (a_i !== 1'b0 || q_i !== 1'b0) failures++;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      load = ($urandom_range(0, 9) == 0);
      en = 1'($urandom);
      {a_first, a_next, b0} = 3'($urandom);
      {ss_win, sc_win, x_lo} = 6'($urandom);
      @(posedge clk);
      if (load) begin
        ea = a_first;
        eq = a_first & b0;
      end else if (en) begin
        logic [1:0] v;
        v = ss_win + sc_win + x_lo;
        ea = a_next;
        eq = v[1] ^ (a_next & b0);
      end
      #1;
      checks++;
      if (a_i != ea || q_i != eq) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: a_i=%0b q_i=%0b expected %0b %0b", t, a_i, q_i, ea, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
