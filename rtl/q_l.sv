// Q_L: quotient look-ahead of the modified SCS Montgomery multiplier.
//
// Iteration i adds x_i in {0, N, B, D} to T_i = (SS + SC) / 2 and needs
// q_i = (T_i + A_i * B_0) mod 2. To keep that decision off the critical path,
// Q_L works it out one cycle ahead: while the CSA forms V_i = T_i + x_i, it
// adds the low two bits of the shifted SS, the shifted SC and x_i (V_i bit 0
// is always 0), so V_i bit 1 is T_{i+1} bit 0 and
//     q_{i+1} = V_i[1] xor (A_{i+1} and B_0).
// q_{i+1} and A_{i+1} are stored in two flip-flops that drive the select of
// M3 in the next cycle. 'load' starts a multiplication with T_0 = 0, so
// q_0 = A_0 and B_0. Precomputing A_i and q_i in cycle i-1 follows the
// description of the multiplier; the two-bit adder that does it is this
// design's own. Registers update on the rising clock edge, reset is
// asynchronous and active low.
module q_l (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,      // start: q_0 = a_first & b0, A_0 = a_first
  input  logic       a_first,   // A_0
  input  logic       en,        // an iteration runs this cycle
  input  logic [1:0] ss_win,    // bits [2:1] of SS
  input  logic [1:0] sc_win,    // bits [2:1] of SC
  input  logic [1:0] x_lo,      // bits [1:0] of the M3 output
  input  logic       a_next,    // A_{i+1}
  input  logic       b0,        // B_0
  output logic       a_i,       // A_i for the current iteration
  output logic       q_i        // q_i for the current iteration
);
  logic [1:0] v;
  logic       q_next;

  assign v      = ss_win + sc_win + x_lo;
  assign q_next = v[1] ^ (a_next & b0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_i <= 1'b0;
      q_i <= 1'b0;
    end else if (load) begin
      a_i <= a_first;
      q_i <= a_first & b0;
    end else if (en) begin
      a_i <= a_next;
      q_i <= q_next;
    end
  end
endmodule
