// Configurable carry-save adder (CCSA).
//
// A row of W full adder cells that works in one of two modes each cycle:
//   CSA_FA : one three-input carry-save addition  x + y + z  -> (sum, carry)
//   CSA_2HA: two serial two-input carry-save additions on x + y (z unused):
//            (s1, c1) = (x ^ y, (x & y) << 1), then (sum, carry) = (s1 ^ c1, (s1 & c1) << 1)
// In the second mode a carry ripples two places per cycle, which halves the
// cycles spent on carry propagation (operand precomputation and the final
// conversion from carry-save to binary form).
//
// Each bit is one full adder cell whose third input is multiplexed between z[j]
// (FA mode) and the first half adder's carry from bit j-1 (2HA mode). In 2HA
// mode the cell's carry output is masked with the propagate term, which leaves
// exactly the second half adder's carry. This split of one full adder into two
// half adders follows the description of the CCSA as "one full adder or two
// serial half adders"; the gate-level arrangement is this design's own.
//
// alpha is a one-bit value added at bit 0 of the carry vector (FA mode) or of
// the first half adder's carry vector (2HA mode); the SCS-MM-New multiplier
// uses it for the carry lost when a carry-save pair is shifted right.
// Carries out of bit W-1 are dropped. Purely combinational.
module ccsa
  import mm_pkg::*;
#(
  parameter int unsigned W = 7
) (
  input  csa_mode_e    mode,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         alpha,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] g;       // first half adder carry (x & y), unshifted
  logic [W-1:0] c1;      // first half adder carry vector, shifted, with alpha
  logic [W-1:0] third;   // third input of each cell
  logic [W-1:0] co;      // cell carry outputs
  logic [W-1:0] p;       // cell propagate outputs
  logic [W-1:0] cv;      // carry to bit j+1 for the selected mode

  assign g  = x & y;
  assign c1 = {g[W-2:0], alpha};
  assign third = (mode == CSA_2HA) ? c1 : z;

  for (genvar j = 0; j < W; j++) begin : g_cell
    cmos_fa u_fa (.a(x[j]), .b(y[j]), .cin(third[j]), .sum(sum[j]), .cout(co[j]), .p(p[j]));
    assign cv[j] = (mode == CSA_2HA) ? (co[j] & p[j]) : co[j];
  end

  assign carry = {cv[W-2:0], (mode == CSA_2HA) ? 1'b0 : alpha};
endmodule
