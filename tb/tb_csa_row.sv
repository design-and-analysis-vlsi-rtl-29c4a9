// Testbench of the one-level carry-save adder row: random W-bit triples whose
// total fits in W bits; checks sum + carry = x + y + z, bit 0 of the carry
// vector is 0, and the sum vector equals the bitwise parity x ^ y ^ z.
module tb_csa_row;
  localparam int unsigned W = 16;
  logic [W-1:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;

  csa_row #(.W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      x = W'($urandom_range(0, (1 << (W - 2)) - 1));
      y = W'($urandom_range(0, (1 << (W - 2)) - 1));
      z = W'($urandom_range(0, (1 << (W - 2)) - 1));
      if (t < 4) begin x = '1 >> 2; y = '1 >> 2; z = '1 >> 2; end
      #1;
      checks += 3;
      if (32'(sum) + 32'(carry) != 32'(x) + 32'(y) + 32'(z)) begin
        failures++;
        if (failures < 10) $display("FAIL %h+%h+%h: sum %h carry %h", x, y, z, sum, carry);
      end
      if (carry[0] != 1'b0) failures++;
      if (sum != (x ^ y ^ z)) failures++;
    end
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
