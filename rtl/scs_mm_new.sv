// SCS-MM-New: semi-carry-save Montgomery modular multiplier with a
// configurable carry-save adder (CCSA) and skipping of idle iterations.
//
// Computes S = A * B * 2^-(K+3) mod N for an odd K-bit modulus N and
// operands A, B < 2N, with S < 2N, so S can be fed back directly.
// The partial result stays in carry-save form (SS, SC); one CCSA row of CMOS
// full adder cells does every addition. A run has four phases:
//   1. precomputation of B^ and D^. B^ = B + B_0 * N is even and congruent
//      to B, so A_i * B^ never changes the parity of the partial result and
//      the quotient bit depends on SS and SC only. D^ = B^ + N. Each sum is a
//      two-input addition in 2HA mode (two serial half-adder rows per cycle)
//      repeated until Zero_D sees SC = 0. N^ = N.
//   2. iterations i = -1 .. K+2: (SS, SC) = (SS >> s) + (SC >> s) + x_i + alpha,
//      x_i in {0, N^, B^, D^} chosen by SM3 from the flip-flops q^ and A^.
//      SS and SC are stored unshifted; s = 1 normally and s = 2 when the
//      iteration before was skipped. alpha is the carry that the dropped low
//      bits of SS and SC would have produced, put into the free bit 0 of the
//      carry vector. Iteration -1 adds 0 to SS = SC = 0 and only primes
//      q^ and A^, so that Skip_D can look ahead from the first real iteration.
//   3. Skip_D decides in each cycle whether the next iteration would add 0
//      (A_{i+1} = 0 and q_{i+1} = 0); such an iteration costs no cycle.
//   4. format conversion: one step (SS >> s) + (SC >> s) + alpha, then
//      SS + SC in 2HA mode until SC = 0. The result is SS.
// Registers N^, B^, D^, A (a shift register feeding A_{i+1}, A_{i+2}), SS, SC,
// plus the flip-flops q^, A^ and the shift amount, as in the block diagram.
// From the description: the CCSA, the M1/M2/SM3/M4/M5 multiplexers, Zero_D,
// Skip_D, iteration -1 with q^ = A^ = 0, the six registers. This design's own:
// the form of B^ and D^ (the five precomputation steps are not spelled out),
// the K+3 iteration count that B^ < 3N then needs for S < 2N, the alpha
// correction, the state machine.
//
// Interface: pulse 'start' for one cycle with a, b, n valid while 'busy' is
// low; 'done' pulses for one cycle and s is valid from then to the next start.
// Latency: 2 + (K+4 - skipped iterations) + 1 + carry-propagation cycles.
// Rising-edge clock, asynchronous active-low reset.
module scs_mm_new
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
  localparam int unsigned W  = K + 3;      // totals stay below 8N < 2^(K+3)
  localparam int unsigned M  = K + 3;      // Montgomery iterations 0 .. K+2
  localparam int unsigned CW = $clog2(M + 2);

  typedef enum logic [2:0] {
    ST_IDLE, ST_PRE_B, ST_PROP_B, ST_PRE_D, ST_PROP_D, ST_MAIN, ST_SHIFT, ST_CONV
  } state_e;

  state_e        state_q;
  logic [K:0]    a_q;
  logic [W-1:0]  nh_q, bh_q, dh_q, ss_q, sc_q;
  logic          qh_q, ah_q, shr2_q;   // q^, A^, shift by two this cycle
  logic [CW-1:0] jp_q;                 // iteration index + 1 (0 is iteration -1)

  fb_sel_e      m1_sel, m2_sel;
  csa_mode_e    mode;
  logic         sm3_zero, use_alpha;
  logic [W-1:0] m1_y, m2_y, sm3_y, cs_s, cs_c;
  logic         sc_zero, alpha, alpha_raw;
  logic [2:0]   ss_win, sc_win;
  logic [W+4:0] ss_ext, sc_ext;
  logic         skip, q_next, a_next, allow_skip;
  logic [CW:0]  jp_next;

  // operand and feedback multiplexers
  shift_mux #(.W(W)) u_m1 (.sel(m1_sel), .reg_in(sc_q), .load_in(nh_q), .y(m1_y));
  shift_mux #(.W(W)) u_m2 (.sel(m2_sel), .reg_in(ss_q), .load_in(bh_q), .y(m2_y));
  operand_mux #(.W(W)) u_sm3 (
    .a_i(ah_q), .q_i(qh_q), .zero(sm3_zero),
    .n_op(nh_q), .b_op(bh_q), .d_op(dh_q), .y(sm3_y)
  );

  // shift correction: carry of the bits dropped by the >> s of SS and SC
  assign alpha_raw = shr2_q ? ((ss_q[1] & sc_q[1]) | ((ss_q[1] ^ sc_q[1]) & ss_q[0] & sc_q[0]))
                            : (ss_q[0] & sc_q[0]);
  assign alpha     = use_alpha & alpha_raw;

  ccsa #(.W(W)) u_ccsa (
    .mode(mode), .x(m1_y), .y(m2_y), .z(sm3_y), .alpha(alpha), .sum(cs_s), .carry(cs_c)
  );
  zero_d #(.W(W)) u_zero (.sc(sc_q), .zero(sc_zero));

  // skip detection
  assign ss_ext = {5'b0, ss_q};
  assign sc_ext = {5'b0, sc_q};
  window_mux u_m4 (.shr2(shr2_q), .low(sc_ext[4:1]), .win(sc_win));
  window_mux u_m5 (.shr2(shr2_q), .low(ss_ext[4:1]), .win(ss_win));
  assign allow_skip = (jp_q < CW'(M));  // iteration j+1 <= K+2 exists
  skip_d u_skip (
    .ss_win(ss_win), .sc_win(sc_win), .alpha(alpha), .x_lo(sm3_y[2:0]),
    .a1(a_q[0]), .a2((K >= 1) ? a_q[1] : 1'b0), .allow_skip(allow_skip),
    .skip(skip), .q_hat(q_next), .a_hat(a_next)
  );
  assign jp_next = {1'b0, jp_q} + (skip ? (CW+1)'(2) : (CW+1)'(1));

  // control
  always_comb begin
    m1_sel    = SEL_PASS;
    m2_sel    = SEL_PASS;
    mode      = CSA_2HA;
    sm3_zero  = 1'b1;
    use_alpha = 1'b0;
    unique case (state_q)
      ST_PRE_B, ST_PRE_D: begin m1_sel = SEL_LOAD; m2_sel = SEL_LOAD; end
      ST_MAIN: begin
        m1_sel    = shr2_q ? SEL_SHR2 : SEL_SHR1;
        m2_sel    = shr2_q ? SEL_SHR2 : SEL_SHR1;
        mode      = CSA_FA;
        sm3_zero  = 1'b0;
        use_alpha = 1'b1;
      end
      ST_SHIFT: begin
        m1_sel    = shr2_q ? SEL_SHR2 : SEL_SHR1;
        m2_sel    = shr2_q ? SEL_SHR2 : SEL_SHR1;
        use_alpha = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      a_q  <= '0;
      nh_q <= '0;
      bh_q <= '0;
      dh_q <= '0;
      ss_q <= '0;
      sc_q <= '0;
      qh_q <= 1'b0;
      ah_q <= 1'b0;
      shr2_q <= 1'b0;
      jp_q <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE: if (start) begin
          a_q  <= a;
          nh_q <= W'(n);
          bh_q <= W'(b);
          state_q <= b[0] ? ST_PRE_B : ST_PRE_D;
        end
        ST_PRE_B, ST_PRE_D: begin
          ss_q <= cs_s;
          sc_q <= cs_c;
          state_q <= (state_q == ST_PRE_B) ? ST_PROP_B : ST_PROP_D;
        end
        ST_PROP_B: begin
          if (sc_zero) begin
            bh_q <= ss_q;                 // B^ = B + N, even
            state_q <= ST_PRE_D;
          end else begin
            ss_q <= cs_s;
            sc_q <= cs_c;
          end
        end
        ST_PROP_D: begin
          if (sc_zero) begin
            dh_q   <= ss_q;               // D^ = B^ + N
            ss_q   <= '0;
            sc_q   <= '0;
            qh_q   <= 1'b0;               // iteration -1 adds 0
            ah_q   <= 1'b0;
            shr2_q <= 1'b0;
            jp_q   <= '0;
            state_q <= ST_MAIN;
          end else begin
            ss_q <= cs_s;
            sc_q <= cs_c;
          end
        end
        ST_MAIN: begin
          ss_q   <= cs_s;
          sc_q   <= cs_c;
          qh_q   <= q_next;
          ah_q   <= a_next;
          shr2_q <= skip;
          a_q    <= skip ? (a_q >> 2) : (a_q >> 1);
          jp_q   <= jp_next[CW-1:0];
          if (jp_next > (CW+1)'(M)) state_q <= ST_SHIFT;
        end
        ST_SHIFT: begin
          ss_q <= cs_s;
          sc_q <= cs_c;
          state_q <= ST_CONV;
        end
        ST_CONV: begin
          if (sc_zero) state_q <= ST_IDLE;
          else begin
            ss_q <= cs_s;
            sc_q <= cs_c;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state_q != ST_IDLE);
  assign done = (state_q == ST_CONV) && sc_zero;
  assign s    = ss_q[K:0];

  // B^ must be even before the iterations start.
  a_bhat_even: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_MAIN) |-> !bh_q[0]);
  // The result of a Montgomery multiplication is below 2N.
  a_result_bound: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (ss_q < (nh_q << 1)));
endmodule
