// Both multipliers built with a 1-bit modulus (K = 1), the smallest size the
// multipliers were characterised at. The only odd 1-bit modulus is N = 1, so
// every operand pair A, B in {0, 1} is run on each multiplier and the exact
// result is compared with the word-level models; the result must be below 2N.
module tb_mm_1bit;
  import mm_ref_pkg::*;
  localparam int unsigned K = 1;
  typedef mm_ref#(K) ref_t;
  typedef logic [K+3:0] val_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mscs_start = 1'b0, new_start = 1'b0;
  logic [K:0] mscs_a = '0, mscs_b = '0, new_a = '0, new_b = '0;
  logic [K-1:0] mscs_n = '1, new_n = '1;
  logic mscs_busy, mscs_done, new_busy, new_done;
  logic [K:0] mscs_s, new_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  montgomery_top #(.K(K)) dut (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int v = 0; v < 4; v++) begin
        @(negedge clk);
        {mscs_a, mscs_b} = {1'b0, v[1], 1'b0, v[0]};
        {new_a, new_b}   = {1'b0, v[0], 1'b0, v[1]};
        mscs_start = 1'b1; new_start = 1'b1;
        @(negedge clk);
        mscs_start = 1'b0; new_start = 1'b0;
        fork
          begin @(posedge mscs_done); #1; end
          begin @(posedge new_done);  #1; end
        join
        wait (!mscs_busy && !new_busy);
        checks += 4;
        if (val_t'(mscs_s) !== ref_t::mscs(val_t'(mscs_a), val_t'(mscs_b), 1)) failures++;
        if (val_t'(new_s)  !== ref_t::scs_new(val_t'(new_a), val_t'(new_b), 1)) failures++;
        if (mscs_s >= 2) failures++;
        if (new_s >= 2) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
