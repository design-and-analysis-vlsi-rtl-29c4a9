// Carry-save Montgomery modular multipliers, side by side.
//
// Two independent multipliers built from the same CMOS full adder cell:
//   * mscs_*  : the modified semi-carry-save multiplier (one-level CSA,
//               quotient look-ahead Q_L), S = A*B*2^-(K+2) mod N;
//   * new_*   : the SCS-MM-New multiplier (configurable CSA, skip detector
//               Skip_D), S = A*B*2^-(K+3) mod N.
// Each has its own start/busy/done handshake and operand ports; they share
// only the clock and the reset, and can run at the same time. In both, N is
// odd and K bits wide, A and B are below 2N, and the result is below 2N.
// The default K = 4 is the operand width of the multipliers that were
// simulated at transistor level; K is a parameter, and the same RTL is used
// for cryptographic sizes such as 1024.
module montgomery_top #(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // modified SCS multiplier
  input  logic         mscs_start,
  input  logic [K:0]   mscs_a,
  input  logic [K:0]   mscs_b,
  input  logic [K-1:0] mscs_n,
  output logic         mscs_busy,
  output logic         mscs_done,
  output logic [K:0]   mscs_s,
  // SCS-MM-New multiplier
  input  logic         new_start,
  input  logic [K:0]   new_a,
  input  logic [K:0]   new_b,
  input  logic [K-1:0] new_n,
  output logic         new_busy,
  output logic         new_done,
  output logic [K:0]   new_s
);
  mscs_mm #(.K(K)) u_mscs (
    .clk(clk), .rst_n(rst_n), .start(mscs_start), .a(mscs_a), .b(mscs_b), .n(mscs_n),
    .busy(mscs_busy), .done(mscs_done), .s(mscs_s)
  );

  scs_mm_new #(.K(K)) u_new (
    .clk(clk), .rst_n(rst_n), .start(new_start), .a(new_a), .b(new_b), .n(new_n),
    .busy(new_busy), .done(new_done), .s(new_s)
  );
endmodule
