// End-to-end testbench of montgomery_top at its default size (K = 4).
//
// Part 1: every odd modulus N = 3..15 and random operand pairs below 2N are
// given to both multipliers at the same time; each result is compared with
// the word-level models in mm_ref_pkg.
// Part 2: modular exponentiation X^E mod N with each multiplier, in
// Montgomery form: X~ = X * R mod N, square-and-multiply on Montgomery
// products (results below 2N are fed back unreduced), and a final product
// with 1 to leave Montgomery form (R = 2^(K+2) for MSCS-MM, 2^(K+3) for
// SCS-MM-New). The result, reduced mod N, is compared with X^E mod N.
// Each mechanism of the design must occur at least once: carry propagation
// in the precomputation and in the conversion of both multipliers, the
// B^ = B + N precomputation for odd B, a skipped iteration, a run ending on
// a shift by two, the alpha correction, two-step (2HA) carry propagation,
// and both multipliers busy together. Average latencies are printed.
module tb_montgomery_top;
  import mm_ref_pkg::*;
  localparam int unsigned K = 4;
  typedef mm_ref#(K) ref_t;
  typedef logic [K+3:0] val_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mscs_start = 1'b0, new_start = 1'b0;
  logic [K:0] mscs_a = '0, mscs_b = '0, new_a = '0, new_b = '0;
  logic [K-1:0] mscs_n = '0, new_n = '0;
  logic mscs_busy, mscs_done, new_busy, new_done;
  logic [K:0] mscs_s, new_s;
  int checks = 0, failures = 0;

  // mechanism counters
  int c_mscs_prop = 0, c_mscs_conv = 0, c_new_preb = 0, c_new_prop = 0, c_new_conv = 0;
  int c_skip = 0, c_shr2_end = 0, c_alpha = 0, c_both = 0;
  int lat_mscs = 0, lat_new = 0, runs = 0;

  always #5 clk = ~clk;

  montgomery_top dut (.*);

  always @(posedge clk) begin
    if (int'(dut.u_mscs.state_q) == 2 && !dut.u_mscs.sc_zero) c_mscs_prop++;
    if (int'(dut.u_mscs.state_q) == 5 && !dut.u_mscs.sc_zero) c_mscs_conv++;
    if (int'(dut.u_new.state_q) == 1) c_new_preb++;
    if ((int'(dut.u_new.state_q) == 2 || int'(dut.u_new.state_q) == 4) && !dut.u_new.sc_zero) c_new_prop++;
    if (int'(dut.u_new.state_q) == 7 && !dut.u_new.sc_zero) c_new_conv++;
    if (int'(dut.u_new.state_q) == 5 && dut.u_new.skip) c_skip++;
    if (int'(dut.u_new.state_q) == 6 && dut.u_new.shr2_q) c_shr2_end++;
    if (dut.u_new.alpha) c_alpha++;
    if (mscs_busy && new_busy) c_both++;
  end

  // run one product on each multiplier concurrently
  task automatic both(input val_t am, bm, an, bn, n, output val_t sm, sn);
    int lm, ln;
    bit dm, dn;
    @(negedge clk);
    mscs_a = (K+1)'(am); mscs_b = (K+1)'(bm); mscs_n = K'(n);
    new_a  = (K+1)'(an); new_b  = (K+1)'(bn); new_n  = K'(n);
    mscs_start = 1'b1; new_start = 1'b1;
    @(negedge clk);
    mscs_start = 1'b0; new_start = 1'b0;
    lm = 1; ln = 1; dm = 0; dn = 0;
    while (!(dm && dn)) begin
      if (mscs_done && !dm) begin dm = 1; sm = val_t'(mscs_s); end
      if (new_done && !dn) begin dn = 1; sn = val_t'(new_s); end
      @(negedge clk);
      if (!dm) lm++;
      if (!dn) ln++;
    end
    lat_mscs += lm; lat_new += ln; runs++;
    checks += 2;
    if (sm !== ref_t::mscs(am, bm, n)) begin
      failures++;
      if (failures < 10) $display("FAIL MSCS %0d*%0d mod %0d: %0d", am, bm, n, sm);
    end
    if (sn !== ref_t::scs_new(an, bn, n)) begin
      failures++;
      if (failures < 10) $display("FAIL NEW %0d*%0d mod %0d: %0d", an, bn, n, sn);
    end
  endtask

  task automatic modexp(input val_t x, input int e, input val_t n);
    val_t xm, xn, accm, accn, tm, tn, rm, rn;
    xm = ref_t::to_mont(x, n, K + 2);
    xn = ref_t::to_mont(x, n, K + 3);
    accm = ref_t::to_mont(1, n, K + 2);
    accn = ref_t::to_mont(1, n, K + 3);
    for (int i = 7; i >= 0; i--) begin
      both(accm, accm, accn, accn, n, tm, tn);
      accm = tm; accn = tn;
      if ((e >> i) & 1) begin
        both(accm, xm, accn, xn, n, tm, tn);
        accm = tm; accn = tn;
      end
    end
    both(accm, 1, accn, 1, n, rm, rn);
    rm = rm % n; rn = rn % n;
    begin
      val_t p;
      p = 1;
      for (int i = 0; i < e; i++) p = ref_t::modmul(p, x, n);
      checks += 2;
      if (rm != p || rn != p) begin
        failures++;
        $display("FAIL modexp %0d^%0d mod %0d: mscs %0d new %0d expected %0d", x, e, n, rm, rn, p);
      end
    end
  endtask

  initial begin
    val_t sm, sn;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int nv = 3; nv < (1 << K); nv += 2)
      for (int t = 0; t < 60; t++)
        both(val_t'($urandom_range(0, 2 * nv - 1)), val_t'($urandom_range(0, 2 * nv - 1)),
             val_t'($urandom_range(0, 2 * nv - 1)), val_t'($urandom_range(0, 2 * nv - 1)),
             val_t'(nv), sm, sn);
    for (int nv = 9; nv < (1 << K); nv += 2)
      for (int t = 0; t < 4; t++)
        modexp(val_t'($urandom_range(0, nv - 1)), $urandom_range(1, 255), val_t'(nv));

    $display("mechanisms: mscs_prop=%0d mscs_conv=%0d new_preB=%0d new_prop=%0d new_conv=%0d skip=%0d shr2_end=%0d alpha=%0d both_busy=%0d",
             c_mscs_prop, c_mscs_conv, c_new_preb, c_new_prop, c_new_conv, c_skip, c_shr2_end, c_alpha, c_both);
    $display("average latency over %0d products: MSCS-MM %0d.%02d cycles, SCS-MM-New %0d.%02d cycles",
             runs, lat_mscs / runs, (lat_mscs * 100 / runs) % 100, lat_new / runs, (lat_new * 100 / runs) % 100);
    checks += 9;
    if (c_mscs_prop == 0) failures++;
    if (c_mscs_conv == 0) failures++;
    if (c_new_preb  == 0) failures++;
    if (c_new_prop  == 0) failures++;
    if (c_new_conv  == 0) failures++;
    if (c_skip      == 0) failures++;
    if (c_shr2_end  == 0) failures++;
    if (c_alpha     == 0) failures++;
    if (c_both      == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
