// Testbench of the M1/M2 feedback multiplexer: every select on random data,
// for the four-input version and the version without the >>2 input.
module tb_shift_mux;
  import mm_pkg::*;
  localparam int unsigned W = 10;
  fb_sel_e sel;
  logic [W-1:0] reg_in, load_in, y4, y3;
  int checks = 0, failures = 0;

  shift_mux #(.W(W))                    dut4 (.sel(sel), .reg_in(reg_in), .load_in(load_in), .y(y4));
  shift_mux #(.W(W), .HAS_SHR2(1'b0))   dut3 (.sel(sel), .reg_in(reg_in), .load_in(load_in), .y(y3));

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [W-1:0] e4, e3;
      reg_in  = W'($urandom);
      load_in = W'($urandom);
      sel     = fb_sel_e'(t % 4);
      #1;
      case (t % 4)
        0: begin e4 = reg_in >> 1; e3 = reg_in >> 1; end
        1: begin e4 = reg_in >> 2; e3 = reg_in >> 1; end
        2: begin e4 = reg_in;      e3 = reg_in;      end
        default: begin e4 = load_in; e3 = load_in; end
      endcase
      checks += 2;
      if (y4 != e4) begin failures++; $display("FAIL sel=%0d y=%h exp %h", t % 4, y4, e4); end
      if (y3 != e3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
