// MSCS-MM: modified semi-carry-save Montgomery modular multiplier.
//
// Computes S = A * B * 2^-(K+2) mod N for an odd K-bit modulus N and
// operands A, B < 2N, with S < 2N, so S can be fed back without a final
// subtraction (K+2 iterations instead of K). The partial result is kept in
// carry-save form (SS, SC) and one level of carry-save adder (a row of CMOS
// full adder cells) does all the work:
//   1. precompute D = B + N: (SS, SC) = N + B + 0, then repeat
//      (SS, SC) = SS + SC + 0 until Zero_D sees SC = 0; D = SS;
//   2. K+2 iterations (SS, SC) = (SS >> 1) + (SC >> 1) + x_i, where x_i is
//      0, N, B or D picked by M3 from A_i and q_i. SS and SC are kept
//      unshifted, so the division by two of each iteration is the >>1 on the
//      inputs of M1 and M2 in the next one. Q_L prepares A_i and q_i a cycle
//      early, so the critical path is one 4-to-1 multiplexer plus one full adder;
//   3. one shifting step (SS >> 1) + (SC >> 1) + 0, then repeat
//      SS + SC + 0 until SC = 0; the result is SS.
// Registers: A (shift register), N, B, D, SS, SC, as in the block diagram.
// The state machine that drives the selects of M1, M2 and M3 is this
// design's own; the diagram leaves it out.
//
// Interface: pulse 'start' for one cycle with a, b, n valid while 'busy' is
// low. 'busy' is high until 'done' pulses for one cycle; s is valid from that
// cycle until the next start. Latency: 3 + K+2 + 1 plus the carry-propagation
// cycles of the precomputation and of the conversion (each at most the length
// of the longest carry chain). Rising-edge clock, asynchronous active-low reset.
module mscs_mm
  import mm_pkg::*;
#(
  parameter int unsigned K = 4   // modulus width in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a,
  input  logic [K:0]   b,
  input  logic [K-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [K:0]   s
);
  localparam int unsigned W = K + 3;   // carry-save totals stay below 6N < 2^(K+3)
  localparam int unsigned ITERS = K + 2;

  typedef enum logic [2:0] {ST_IDLE, ST_PRE, ST_PROP, ST_MAIN, ST_SHIFT, ST_CONV} state_e;

  state_e       state_q;
  logic [K:0]   a_q;
  logic [W-1:0] n_q, b_q, d_q, ss_q, sc_q;
  logic [$clog2(ITERS+1)-1:0] it_q;

  // datapath
  fb_sel_e      m1_sel, m2_sel;
  logic         m3_zero;
  logic [W-1:0] m1_y, m2_y, m3_y, csa_s, csa_c;
  logic         sc_zero;
  logic         a_i, q_i;
  logic         ql_load, ql_en;

  shift_mux #(.W(W), .HAS_SHR2(1'b0)) u_m1 (.sel(m1_sel), .reg_in(sc_q), .load_in(n_q), .y(m1_y));
  shift_mux #(.W(W), .HAS_SHR2(1'b0)) u_m2 (.sel(m2_sel), .reg_in(ss_q), .load_in(b_q), .y(m2_y));
  operand_mux #(.W(W)) u_m3 (
    .a_i(a_i), .q_i(q_i), .zero(m3_zero),
    .n_op(n_q), .b_op(b_q), .d_op(d_q), .y(m3_y)
  );
  csa_row #(.W(W)) u_csa (.x(m1_y), .y(m2_y), .z(m3_y), .sum(csa_s), .carry(csa_c));
  zero_d  #(.W(W)) u_zero (.sc(sc_q), .zero(sc_zero));
  q_l u_ql (
    .clk(clk), .rst_n(rst_n), .load(ql_load), .a_first(a_q[0]), .en(ql_en),
    .ss_win(ss_q[2:1]), .sc_win(sc_q[2:1]), .x_lo(m3_y[1:0]),
    .a_next(a_q[0]), .b0(b_q[0]), .a_i(a_i), .q_i(q_i)
  );

  // control
  always_comb begin
    m1_sel  = SEL_PASS;
    m2_sel  = SEL_PASS;
    m3_zero = 1'b1;
    ql_load = 1'b0;
    ql_en   = 1'b0;
    unique case (state_q)
      ST_PRE:   begin m1_sel = SEL_LOAD; m2_sel = SEL_LOAD; end
      ST_PROP:  ql_load = sc_zero;
      ST_MAIN:  begin m1_sel = SEL_SHR1; m2_sel = SEL_SHR1; m3_zero = 1'b0; ql_en = 1'b1; end
      ST_SHIFT: begin m1_sel = SEL_SHR1; m2_sel = SEL_SHR1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      a_q  <= '0;
      n_q  <= '0;
      b_q  <= '0;
      d_q  <= '0;
      ss_q <= '0;
      sc_q <= '0;
      it_q <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE: if (start) begin
          a_q   <= a;
          n_q   <= W'(n);
          b_q   <= W'(b);
          state_q <= ST_PRE;
        end
        ST_PRE: begin
          ss_q <= csa_s;
          sc_q <= csa_c;
          state_q <= ST_PROP;
        end
        ST_PROP: begin
          if (sc_zero) begin
            d_q  <= ss_q;          // D = B + N
            ss_q <= '0;
            sc_q <= '0;
            a_q  <= a_q >> 1;      // A_0 went to Q_L, A_1 now at bit 0
            it_q <= '0;
            state_q <= ST_MAIN;
          end else begin
            ss_q <= csa_s;
            sc_q <= csa_c;
          end
        end
        ST_MAIN: begin
          ss_q <= csa_s;
          sc_q <= csa_c;
          a_q  <= a_q >> 1;
          it_q <= it_q + 1'b1;
          if (it_q == ($bits(it_q))'(ITERS - 1)) state_q <= ST_SHIFT;
        end
        ST_SHIFT: begin
          ss_q <= csa_s;
          sc_q <= csa_c;
          state_q <= ST_CONV;
        end
        ST_CONV: begin
          if (sc_zero) state_q <= ST_IDLE;
          else begin
            ss_q <= csa_s;
            sc_q <= csa_c;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state_q != ST_IDLE);
  assign done = (state_q == ST_CONV) && sc_zero;
  assign s    = ss_q[K:0];

  // The result of a Montgomery multiplication is below 2N.
  a_result_bound: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (ss_q < (n_q << 1)));
endmodule
