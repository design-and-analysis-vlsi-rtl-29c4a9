// Zero detector Zero_D: flags that the carry vector SC is all zeros.
//
// The carry-save pair (SS, SC) equals its binary value SS once SC is zero, so
// this one wide NOR ends the carry-propagation loops of the precomputation
// and of the final format conversion. Purely combinational.
module zero_d #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] sc,
  output logic         zero
);
  assign zero = ~|sc;
endmodule
