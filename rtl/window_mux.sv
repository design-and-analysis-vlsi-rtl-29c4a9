// M4 / M5: 3-bit 2-to-1 multiplexers giving the skip detector the low three
// bits of SC (M4) or SS (M5) after the shift the current cycle applies:
// bits [3:1] for a shift by one, bits [4:2] for a shift by two. They are
// k-independent and much smaller than the W-bit multiplexers M1 and M2.
// Purely combinational.
module window_mux (
  input  logic       shr2,
  input  logic [4:1] low,     // bits [4:1] of the register
  output logic [2:0] win
);
  assign win = shr2 ? low[4:2] : low[3:1];
endmodule
