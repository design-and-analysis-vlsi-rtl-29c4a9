// Self-checking testbench of the modified SCS (MSCS-MM) multiplier at K = 4.
//
// Runs every odd modulus N from 3 to 15 with every pair of operands A, B < 2N.
// The expected result is computed bit-serially in the testbench:
//   T = 0; for i = 0..K+1: q_i = (T + A_i*B) mod 2; T = (T + A_i*B + q_i*N) / 2.
// Checks per run: exact result, result below 2N, result congruent to
// A*B*2^-(K+2) mod N, and exactly K+2 cycles in the iteration phase (one
// iteration per cycle, no skipping in this multiplier).
module tb_mscs_mm;
  localparam int unsigned K = 4;
  localparam int unsigned M = K + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [K:0] a = '0, b = '0;
  logic [K-1:0] n = '0;
  logic busy, done;
  logic [K:0] s;
  int checks = 0, failures = 0;
  int main_cycles, long_conv = 0, conv_cycles;

  always #5 clk = ~clk;

  mscs_mm #(.K(K)) dut (.*);

  always @(posedge clk) if (int'(dut.state_q) == 3) main_cycles++;
  always @(posedge clk) if (int'(dut.state_q) == 5) conv_cycles++;

  function automatic logic [K+3:0] model(input logic [K:0] aa, bb, input logic [K-1:0] nn);
    logic [K+3:0] t;
    t = '0;
    for (int i = 0; i < int'(M); i++) begin
      logic ai, qi;
      ai = (i <= int'(K)) ? aa[i] : 1'b0;
      qi = t[0] ^ (ai & bb[0]);
      t = (t + (ai ? (K+4)'(bb) : '0) + (qi ? (K+4)'(nn) : '0)) >> 1;
    end
    return t;
  endfunction

  function automatic int modexp2inv(input int nn);   // 2^-(K+2) mod nn
    int r;
    r = 1;
    for (int i = 0; i < int'(M); i++) r = (r % 2 == 0) ? r / 2 : (r + nn) / 2;
    return r % nn;
  endfunction

  task automatic run(input int av, bv, nv);
    logic [K+3:0] exp_t;
    exp_t = model((K+1)'(av), (K+1)'(bv), K'(nv));
    @(negedge clk);
    a = (K+1)'(av); b = (K+1)'(bv); n = K'(nv); start = 1'b1;
    main_cycles = 0;
    conv_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks += 4;
    if ((K+4)'(s) !== exp_t) begin
      failures++;
      if (failures < 10) $display("FAIL A=%0d B=%0d N=%0d: s=%0d expected %0d", av, bv, nv, s, exp_t);
    end
    if (int'(s) >= 2 * nv) failures++;
    if ((int'(s) % nv) != ((av * bv % nv) * modexp2inv(nv)) % nv) failures++;
    if (main_cycles != int'(M)) begin
      failures++;
      if (failures < 10) $display("FAIL cycles: %0d expected %0d", main_cycles, M);
    end
    if (conv_cycles > 1) long_conv++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int nv = 3; nv < (1 << K); nv += 2)
      for (int av = 0; av < 2 * nv; av++)
        for (int bv = 0; bv < 2 * nv; bv++)
          run(av, bv, nv);
    checks++;
    if (long_conv == 0) failures++;   // conversion needed carry propagation at least once
    $display("runs whose conversion needed carry propagation: %0d", long_conv);
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
