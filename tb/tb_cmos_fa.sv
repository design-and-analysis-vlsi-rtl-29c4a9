// Exhaustive testbench of the full adder cell: all eight input combinations,
// sum, carry and propagate compared with the arithmetic sum a + b + cin.
module tb_cmos_fa;
  logic a, b, cin, sum, cout, p;
  int checks = 0, failures = 0;

  cmos_fa dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks += 2;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
      if (p != (a != b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
