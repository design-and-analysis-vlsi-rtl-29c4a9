// Feedback multiplexer M1 / M2: selects one addend of the carry-save adder.
//
// M1 feeds the SC register (or N during precomputation), M2 the SS register
// (or B). The register can be passed shifted right by one (one Montgomery
// iteration), by two (an iteration followed by a skipped one), or as it is
// (carry propagation); SEL_LOAD passes the operand register. The inputs
// >>1, >>2, the register and the operand follow the block diagrams; the
// encoding is in mm_pkg. The modified SCS multiplier never selects SEL_SHR2,
// and with HAS_SHR2 = 0 that input is left out (SEL_SHR2 then acts as SEL_SHR1).
// Purely combinational.
module shift_mux
  import mm_pkg::*;
#(
  parameter int unsigned W        = 7,
  parameter bit          HAS_SHR2 = 1'b1
) (
  input  fb_sel_e      sel,
  input  logic [W-1:0] reg_in,
  input  logic [W-1:0] load_in,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      SEL_SHR1: y = reg_in >> 1;
      SEL_SHR2: y = HAS_SHR2 ? (reg_in >> 2) : (reg_in >> 1);
      SEL_PASS: y = reg_in;
      SEL_LOAD: y = load_in;
      default:  y = reg_in;
    endcase
  end
endmodule
