// Shared types for the carry-save Montgomery multipliers.
//
// The two multipliers (the modified semi-carry-save MM and the SCS-MM-New
// skip multiplier) steer one carry-save adder row through a few operand
// multiplexers. The select encodings below are this design's own choice;
// the multiplexer names (M1, M2, M3/SM3, M4, M5) follow the block diagrams.
package mm_pkg;

  // Select of the k-bit feedback multiplexers M1 (SC side) and M2 (SS side).
  //   SEL_SHR1 : register >> 1   (one Montgomery iteration, divide by 2)
  //   SEL_SHR2 : register >> 2   (an iteration plus a skipped one, divide by 4)
  //   SEL_PASS : register as is  (carry propagation / format conversion)
  //   SEL_LOAD : operand register (N on M1, B on M2) for the precomputation
  typedef enum logic [1:0] {
    SEL_SHR1 = 2'd0,
    SEL_SHR2 = 2'd1,
    SEL_PASS = 2'd2,
    SEL_LOAD = 2'd3
  } fb_sel_e;

  // Mode of the configurable carry-save adder (CCSA).
  //   CSA_FA  : one three-input carry-save addition (full-adder row)
  //   CSA_2HA : two serial two-input carry-save additions (two half-adder rows)
  typedef enum logic {
    CSA_FA  = 1'b0,
    CSA_2HA = 1'b1
  } csa_mode_e;

  // Operand chosen by M3 / SM3 from the multiplier bit A_i and quotient bit q_i:
  // {A_i, q_i} = 00 -> 0, 01 -> N, 10 -> B, 11 -> D = B + N.
  function automatic logic [1:0] operand_code(input logic a_i, input logic q_i);
    return {a_i, q_i};
  endfunction

endpackage
