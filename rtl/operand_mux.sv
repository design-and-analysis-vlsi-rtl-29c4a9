// Operand multiplexer M3 (modified SCS multiplier) / SM3 (SCS-MM-New).
//
// Chooses the third addend of the carry-save adder from the multiplier bit
// A_i and the quotient bit q_i: 0, N, B or D = B + N. Both bits come from
// flip-flops loaded one cycle earlier, so the select is ready at the start
// of the cycle and the critical path is one 4-to-1 multiplexer plus one full
// adder. 'zero' forces the 0 input (used in the format conversion). In
// SCS-MM-New the operands are the hatted registers N^, B^, D^.
// Purely combinational.
module operand_mux #(
  parameter int unsigned W = 7
) (
  input  logic         a_i,
  input  logic         q_i,
  input  logic         zero,
  input  logic [W-1:0] n_op,
  input  logic [W-1:0] b_op,
  input  logic [W-1:0] d_op,
  output logic [W-1:0] y
);
  always_comb begin
    if (zero) y = '0;
    else begin
      unique case ({a_i, q_i})
        2'b00:   y = '0;
        2'b01:   y = n_op;
        2'b10:   y = b_op;
        default: y = d_op;
      endcase
    end
  end
endmodule
