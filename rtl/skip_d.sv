// Skip_D: skip detector of the SCS-MM-New Montgomery multiplier.
//
// In cycle i the carry-save adder forms V_i = T_i + x_i. Skip_D works out,
// from three-bit windows only, what the next cycle must do:
//   * the low bits of V_i, from the shifted SS and SC windows (M5, M4), the
//     shift correction alpha and the low bits of the selected operand x_i;
//     V_i bit 0 is always 0;
//   * q_{i+1} = V_i[1]. B^ is made even during precomputation, so A_{i+1} * B^
//     never changes the parity and the quotient bit does not depend on A;
//   * skip_{i+1} = not A_{i+1} and not q_{i+1}: iteration i+1 would add 0 and
//     only halve, so it is merged into the next cycle as a shift by two
//     (allowed only when iteration i+1 exists, input allow_skip);
//   * q^ and A^ for the next cycle: (q_{i+1}, A_{i+1}) normally, or
//     (q_{i+2} = V_i[2], A_{i+2}) when iteration i+1 is skipped.
// The outputs go to the three flip-flops q^, skip_{i+1} and A^ outside this
// block. The inputs and outputs follow the block diagram; the gates inside
// (a three-bit adder and two 2-to-1 multiplexers) are this design's own.
// Purely combinational.
module skip_d (
  input  logic [2:0] ss_win,     // M5: low three bits of the shifted SS
  input  logic [2:0] sc_win,     // M4: low three bits of the shifted SC
  input  logic       alpha,      // carry lost in the shift, added at bit 0
  input  logic [2:0] x_lo,       // low three bits of the SM3 output
  input  logic       a1,         // A_{i+1}
  input  logic       a2,         // A_{i+2}
  input  logic       allow_skip, // iteration i+1 exists and may be skipped
  output logic       skip,       // skip_{i+1}
  output logic       q_hat,      // next q^
  output logic       a_hat       // next A^
);
  logic [2:0] v;
  logic       q1;

  assign v     = ss_win + sc_win + x_lo + {2'b00, alpha};
  assign q1    = v[1];
  assign skip  = allow_skip & ~(a1 | q1);
  assign q_hat = skip ? v[2] : q1;
  assign a_hat = skip ? a2   : a1;
endmodule
