// Testbench of the zero detector: all-zero input, every one-hot input and
// random inputs.
module tb_zero_d;
  localparam int unsigned W = 12;
  logic [W-1:0] sc;
  logic zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.*);

  task automatic chk(input logic [W-1:0] v);
    sc = v;
    #1;
    checks++;
    if (zero != (v == '0)) begin
      failures++;
      $display("FAIL sc=%h zero=%0b", v, zero);
    end
  endtask

  initial begin
    chk('0);
    for (int i = 0; i < int'(W); i++) chk(W'(1) << i);
    for (int t = 0; t < 200; t++) chk(W'($urandom));
    chk('0);
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
