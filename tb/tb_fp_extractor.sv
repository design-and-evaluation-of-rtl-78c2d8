// Test of fp_extractor: field split, hidden bit and mode gating of the
// significands and blocks, on random words in both modes.
module tb_fp_extractor;
  import fma_pkg::*;
  logic [31:0] a_in, b_in, c_in;
  type_sel_e   type_sel;
  fp32_t       a_f, b_f, c_f;
  logic [23:0] b_sig, c_sig;
  logic [31:0] b_block, c_block;
  int checks = 0, failures = 0;

  fp_extractor dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s a=%h b=%h c=%h ts=%0d", what, a_in, b_in, c_in, type_sel); end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      a_in = $urandom; b_in = $urandom; c_in = $urandom;
      if (n % 7 == 0) b_in[30:23] = 0;
      if (n % 11 == 0) c_in[30:23] = 0;
      type_sel = type_sel_e'(n % 2);
      #1;
      chk(a_f.sign == a_in[31] && a_f.exp == a_in[30:23] && a_f.frac == a_in[22:0], "a fields");
      chk(b_f == b_in && c_f == c_in, "b/c fields");
      if (type_sel == SEL_FP32) begin
        chk(b_sig == {b_in[30:23] != 0, b_in[22:0]}, "b significand");
        chk(c_sig == {c_in[30:23] != 0, c_in[22:0]}, "c significand");
        chk(b_block == 0 && c_block == 0, "blocks gated");
      end else begin
        chk(b_block == b_in && c_block == c_in, "blocks forwarded");
        chk(b_sig == 0 && c_sig == 0, "significands gated");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
