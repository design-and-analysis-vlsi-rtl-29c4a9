// Testbench of the M4/M5 window multiplexer: for every register value and
// both shifts, the output must be bits [2:0] of the shifted register.
module tb_window_mux;
  logic shr2;
  logic [4:1] low;
  logic [2:0] win;
  int checks = 0, failures = 0;

  window_mux dut (.*);

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int s = 0; s < 2; s++) begin
        logic [4:0] r;
        r = 5'(v);
        low = r[4:1];
        shr2 = 1'(s);
        #1;
        checks++;
        if (win != 3'(s ? (r >> 2) : (r >> 1))) begin
          failures++;
          $display("FAIL reg=%b shr2=%0d win=%b", r, s, win);
        end
      end
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
