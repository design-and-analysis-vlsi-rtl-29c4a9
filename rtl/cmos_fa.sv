// One-bit full adder cell, the logic of the 14-transistor CMOS full adder.
//
// The cell first forms the propagate term p = A xor B. The sum is p xor Cin.
// The carry comes from a 2-to-1 pass-gate multiplexer: when p is 1 the carry-in
// passes to Cout, otherwise A (equal to B then) does. The names A, B, Cin,
// "A xor B", Sum and Cout and the Cout multiplexer controlled by A xor B follow
// the cell's schematic. The cell's transistor sizing and its power/delay are
// outside what RTL can express; this module keeps only its Boolean function.
// The propagate term is brought out because the configurable carry-save adder
// reuses it. Purely combinational.
module cmos_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic p      // propagate, A xor B
);
  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = p ? cin : a;
  end
endmodule
