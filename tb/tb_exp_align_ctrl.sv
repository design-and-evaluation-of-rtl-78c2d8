// Test of exp_align_ctrl: product exponent and exponent difference for
// random FP32 exponents, shared exponents, precisions and shifts.
module tb_exp_align_ctrl;
  import fma_pkg::*;
  type_sel_e type_sel;
  mx_mode_e  mode;
  logic [7:0] a_exp, b_exp, c_exp, e8m0_i, e8m0_w;
  logic [5:0] norm;
  logic signed [EXP_W-1:0] a_exp_u, p_exp, exp_diff;
  int checks = 0, failures = 0;
  exp_align_ctrl dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int ep, fb;
      type_sel = type_sel_e'($urandom_range(0, 1));
      mode = mx_mode_e'($urandom_range(0, 3));
      {a_exp, b_exp, c_exp, e8m0_i, e8m0_w} = {$urandom, 8'($urandom)};
      norm = 6'($urandom_range(0, 52));
      #1;
      fb = (mode == MX_INT4) ? 2 : (mode == MX_INT2) ? 0 : 6;
      // Weight of bit 52 of the product field, minus the normalization.
      if (type_sel == SEL_FP32) ep = int'(b_exp) - 127 + int'(c_exp) - 127 + 1 - int'(norm);
      else ep = int'(e8m0_i) + int'(e8m0_w) - 254 - 2 * fb + 52 - int'(norm);
      checks++;
      if (int'(a_exp_u) != int'(a_exp) - 127 || int'(p_exp) != ep || int'(exp_diff) != int'(a_exp) - 127 - ep) begin
        failures++; $display("FAIL ts=%0d p_exp=%0d exp %0d", type_sel, p_exp, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
