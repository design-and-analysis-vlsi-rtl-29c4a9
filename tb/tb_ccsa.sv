// Testbench of the configurable carry-save adder in both modes.
// FA mode: sum + carry = x + y + z + alpha and sum = x ^ y ^ z.
// 2HA mode: the outputs equal two serial half-adder steps worked out here,
// (s1, c1) = (x ^ y, (x & y) << 1 | alpha), (sum, carry) = (s1 ^ c1, (s1 & c1) << 1),
// and repeating the mode on (sum, carry) reaches carry = 0 with sum = x + y + alpha
// in at most W/2 + 1 steps.
module tb_ccsa;
  import mm_pkg::*;
  localparam int unsigned W = 16;
  csa_mode_e mode;
  logic [W-1:0] x, y, z, sum, carry;
  logic alpha;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] s1, c1, es, ec;
      logic [31:0] total;
      int steps;
      x = W'($urandom_range(0, (1 << (W - 2)) - 1));
      y = W'($urandom_range(0, (1 << (W - 2)) - 1));
      z = W'($urandom_range(0, (1 << (W - 2)) - 1));
      alpha = 1'($urandom);
      // FA mode
      mode = CSA_FA;
      #1;
      checks += 2;
      if (32'(sum) + 32'(carry) != 32'(x) + 32'(y) + 32'(z) + 32'(alpha)) begin
        failures++;
        if (failures < 10) $display("FAIL FA %h+%h+%h+%0d: %h %h", x, y, z, alpha, sum, carry);
      end
      if (sum != (x ^ y ^ z)) failures++;
      // 2HA mode, one step
      mode = CSA_2HA;
      #1;
      s1 = x ^ y;
      c1 = ((x & y) << 1) | W'(alpha);
      es = s1 ^ c1;
      ec = (s1 & c1) << 1;
      checks++;
      if (sum != es || carry != ec) begin
        failures++;
        if (failures < 10) $display("FAIL 2HA %h+%h+%0d: %h %h expected %h %h", x, y, alpha, sum, carry, es, ec);
      end
      // 2HA mode, iterated to completion
      total = 32'(x) + 32'(y) + 32'(alpha);
      steps = 0;
      while (carry != '0 && steps < W) begin
        x = sum; y = carry; alpha = 1'b0;
        #1;
        steps++;
      end
      checks += 2;
      if (carry != '0 || 32'(sum) != total) failures++;
      if (steps > int'(W) / 2 + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
