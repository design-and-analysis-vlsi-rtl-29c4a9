// Testbench of the M3/SM3 operand multiplexer: the output must equal
// A_i * B + q_i * N (with D = B + N), or 0 when forced.
module tb_operand_mux;
  localparam int unsigned W = 10;
  logic a_i, q_i, zero;
  logic [W-1:0] n_op, b_op, d_op, y;
  int checks = 0, failures = 0;

  operand_mux #(.W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [W-1:0] e;
      n_op = W'($urandom_range(0, (1 << (W - 1)) - 1));
      b_op = W'($urandom_range(0, (1 << (W - 1)) - 1));
      d_op = n_op + b_op;
      {a_i, q_i} = 2'(t);
      zero = (t % 7 == 3);
      #1;
      e = zero ? '0 : (a_i ? b_op : '0) + (q_i ? n_op : '0);
      checks++;
      if (y != e) begin failures++; $display("FAIL a=%0b q=%0b zero=%0b y=%h exp %h", a_i, q_i, zero, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
