// Self-checking testbench of the SCS-MM-New multiplier at K = 4.
//
// Runs every odd modulus N from 3 to 15 with every pair of operands A, B < 2N.
// The expected result is computed bit-serially in the testbench:
//   B^ = B + B_0*N; T = 0; for i = 0..K+2: T = (T + A_i*B^ + q_i*N) / 2,
//   q_i = (T + A_i*B^) mod 2,
// which also gives the exact (not only modular) value the hardware must
// return. Checks per run: exact result, result below 2N, result congruent to
// A*B*2^-(K+3) mod N, and the number of cycles spent in the iteration phase,
// which is 1 (iteration -1) plus the iterations that are not skipped (an
// iteration is skipped when it would add 0 and the one before it was run),
// and the length of the final conversion, at most (K+3)/2 + 2 cycles since
// the CCSA moves carries two places per cycle.
module tb_scs_mm_new;
  localparam int unsigned K = 4;
  localparam int unsigned M = K + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [K:0] a = '0, b = '0;
  logic [K-1:0] n = '0;
  logic busy, done;
  logic [K:0] s;
  int checks = 0, failures = 0;
  int main_cycles, total_skips = 0, shr2_final = 0, alpha_seen = 0;
  int conv_cycles, conv_max = 0;

  always #5 clk = ~clk;

  scs_mm_new #(.K(K)) dut (.*);

  always @(posedge clk) if (int'(dut.state_q) == 5) main_cycles++;
  always @(posedge clk) if (dut.alpha) alpha_seen++;
  always @(posedge clk) if (int'(dut.state_q) == 7) conv_cycles++;

  // expected exact result and iteration-phase cycles
  task automatic model(input logic [K:0] aa, bb, input logic [K-1:0] nn,
                       output logic [K+3:0] t, output int cyc);
    logic [K+3:0] bh;
    logic zero_it [M];
    int j;
    bh = (K+4)'(bb) + (bb[0] ? (K+4)'(nn) : '0);
    t = '0;
    for (int i = 0; i < int'(M); i++) begin
      logic ai, qi;
      ai = (i <= int'(K)) ? aa[i] : 1'b0;
      qi = t[0];
      zero_it[i] = !ai && !qi;
      t = (t + (ai ? bh : '0) + (qi ? (K+4)'(nn) : '0)) >> 1;
    end
    cyc = 0;
    j = -1;
    while (j <= int'(M) - 1) begin
      cyc++;
      if (j + 1 <= int'(M) - 1 && zero_it[j+1]) j += 2;
      else j += 1;
    end
  endtask

  function automatic int modexp2inv(input int nn);   // 2^-(K+3) mod nn
    int r;
    r = 1;
    for (int i = 0; i < int'(M); i++) r = (r % 2 == 0) ? r / 2 : (r + nn) / 2;
    return r % nn;
  endfunction

  task automatic run(input int av, bv, nv);
    logic [K+3:0] exp_t;
    int exp_cyc, cyc_latency;
    model((K+1)'(av), (K+1)'(bv), K'(nv), exp_t, exp_cyc);
    @(negedge clk);
    a = (K+1)'(av); b = (K+1)'(bv); n = K'(nv); start = 1'b1;
    main_cycles = 0;
    conv_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    cyc_latency = 1;
    while (!done) begin @(negedge clk); cyc_latency++; end
    checks += 4;
    if ((K+4)'(s) !== exp_t) begin
      failures++;
      if (failures < 10) $display("FAIL A=%0d B=%0d N=%0d: s=%0d expected %0d", av, bv, nv, s, exp_t);
    end
    if (int'(s) >= 2 * nv) failures++;
    if ((int'(s) % nv) != ((av * bv % nv) * modexp2inv(nv)) % nv) failures++;
    if (main_cycles != exp_cyc) begin
      failures++;
      if (failures < 10) $display("FAIL cycles A=%0d B=%0d N=%0d: %0d expected %0d", av, bv, nv, main_cycles, exp_cyc);
    end
    // two carry positions per 2HA step: a chain over the K+3 bits needs
    // at most (K+3)/2 + 1 steps, plus the cycle that sees SC = 0
    checks++;
    if (conv_cycles > int'(K + 3) / 2 + 2) failures++;
    if (conv_cycles > conv_max) conv_max = conv_cycles;
    total_skips += int'(M) + 1 - exp_cyc;
    if (dut.shr2_q) shr2_final++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int nv = 3; nv < (1 << K); nv += 2)
      for (int av = 0; av < 2 * nv; av++)
        for (int bv = 0; bv < 2 * nv; bv++)
          run(av, bv, nv);
    // the mechanisms must all have been exercised
    checks += 3;
    if (total_skips == 0) failures++;
    if (shr2_final == 0) failures++;
    if (alpha_seen == 0) failures++;
    $display("skipped iterations %0d, runs ending on a double shift %0d, alpha cycles %0d, longest conversion %0d cycles",
             total_skips, shr2_final, alpha_seen, conv_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
