// One-level carry-save adder (CSA) built from a row of full adder cells.
//
// It adds three W-bit vectors x, y, z into a sum vector and a carry vector,
// with no carry propagation: bit j of the sum is the full adder's sum, and the
// full adder's carry goes to bit j+1 of the carry vector. Bit 0 of the carry
// vector is always 0; the carry out of bit W-1 is dropped, which the
// multipliers allow because their totals stay below 2^W. Used in the modified
// SCS multiplier, where the row is made of the CMOS full adder cells.
// Purely combinational.
module csa_row #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] co;
  logic [W-1:0] unused_p;

  for (genvar j = 0; j < W; j++) begin : g_fa
    cmos_fa u_fa (.a(x[j]), .b(y[j]), .cin(z[j]), .sum(sum[j]), .cout(co[j]), .p(unused_p[j]));
  end

  assign carry = {co[W-2:0], 1'b0};
endmodule
