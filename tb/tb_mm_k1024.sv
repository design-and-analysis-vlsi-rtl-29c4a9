// Both multipliers built at a cryptographic size, K = 1024 (a 1024-bit RSA
// modulus). Random odd 1024-bit moduli with the top bit set and random
// operands below 2N; every product is compared with the word-level models.
// Then a modular exponentiation X^E mod N with a 24-bit exponent is run on
// each multiplier in Montgomery form and compared with repeated modular
// multiplication. Prints the average latency of one product.
module tb_mm_k1024;
  import mm_ref_pkg::*;
  localparam int unsigned K = 1024;
  typedef mm_ref#(K) ref_t;
  typedef logic [K+3:0] val_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mscs_start = 1'b0, new_start = 1'b0;
  logic [K:0] mscs_a = '0, mscs_b = '0, new_a = '0, new_b = '0;
  logic [K-1:0] mscs_n = '0, new_n = '0;
  logic mscs_busy, mscs_done, new_busy, new_done;
  logic [K:0] mscs_s, new_s;
  int checks = 0, failures = 0;
  longint lat_mscs = 0, lat_new = 0, runs = 0;

  always #5 clk = ~clk;

  montgomery_top #(.K(K)) dut (.*);

  function automatic val_t rand_below(val_t lim);
    val_t r;
    for (int i = 0; i < (K + 4 + 31) / 32; i++) r[i*32 +: 32] = $urandom;
    return r % lim;
  endfunction

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
    if (sm !== ref_t::mscs(am, bm, n)) begin failures++; $display("FAIL MSCS product"); end
    if (sn !== ref_t::scs_new(an, bn, n)) begin failures++; $display("FAIL SCS-MM-New product"); end
  endtask

  initial begin
    val_t n, x, sm, sn, xm, xn, accm, accn, p;
    int e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      n = rand_below(val_t'(1) << K);
      n[K-1] = 1'b1;
      n[0] = 1'b1;
      both(rand_below(2 * n), rand_below(2 * n), rand_below(2 * n), rand_below(2 * n), n, sm, sn);
    end
    // exponentiation
    n = rand_below(val_t'(1) << K);
    n[K-1] = 1'b1;
    n[0] = 1'b1;
    x = rand_below(n);
    e = int'($urandom_range(1 << 23, (1 << 24) - 1));
    xm = ref_t::to_mont(x, n, K + 2);
    xn = ref_t::to_mont(x, n, K + 3);
    accm = ref_t::to_mont(1, n, K + 2);
    accn = ref_t::to_mont(1, n, K + 3);
    p = 1;
    for (int i = 23; i >= 0; i--) begin
      both(accm, accm, accn, accn, n, accm, accn);
      p = ref_t::modmul(p, p, n);
      if ((e >> i) & 1) begin
        both(accm, xm, accn, xn, n, accm, accn);
        p = ref_t::modmul(p, x, n);
      end
    end
    both(accm, 1, accn, 1, n, sm, sn);
    checks += 2;
    if (sm % n != p) begin failures++; $display("FAIL MSCS exponentiation"); end
    if (sn % n != p) begin failures++; $display("FAIL SCS-MM-New exponentiation"); end
    $display("average latency over %0d products at K=%0d: MSCS-MM %0d cycles, SCS-MM-New %0d cycles",
             runs, K, lat_mscs / runs, lat_new / runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
