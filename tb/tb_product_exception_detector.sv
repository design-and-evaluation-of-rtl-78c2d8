// Test of product_exception_detector: random operand classes and product
// exponents around the overflow (2^129) and underflow (2^-126) limits.
module tb_product_exception_detector;
  import fma_pkg::*;
  type_sel_e type_sel;
  fp_class_t b_cls, c_cls;
  logic      field_zero;
  logic signed [EXP_W-1:0] p_exp;
  logic p_nan, p_invalid, p_inf, p_ovf, p_unf, p_zero;
  int checks = 0, failures = 0;
  product_exception_detector dut (.*);

  function automatic fp_class_t rcls();
    fp_class_t c = '0;
    case ($urandom_range(0, 4))
      0: c.zero = 1;
      1: c.inf = 1;
      2: c.nan = 1;
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic en, ei, ef, eo, eu, ez, fp;
      int e;
      type_sel = type_sel_e'($urandom_range(0, 1));
      b_cls = rcls(); c_cls = rcls();
      field_zero = ($urandom_range(0, 5) == 0);
      e = (n % 3 == 0) ? $urandom_range(120, 135) : (n % 3 == 1) ? -$urandom_range(120, 135) : $urandom_range(0, 600) - 300;
      p_exp = EXP_W'(e);
      #1;
      fp = (type_sel == SEL_FP32);
      en = fp && (b_cls.nan || c_cls.nan);
      ei = fp && !en && ((b_cls.zero && c_cls.inf) || (b_cls.inf && c_cls.zero));
      ef = fp && !en && !ei && (b_cls.inf || c_cls.inf);
      ez = fp ? (b_cls.zero || c_cls.zero) : field_zero;
      eo = !en && !ei && !ef && !ez && e >= 129;
      eu = !en && !ei && !ef && !ez && e < -126;
      ez = !en && !ei && !ef && (ez || eu);
      checks++;
      if ({p_nan, p_invalid, p_inf, p_ovf, p_unf, p_zero} != {en, ei, ef, eo, eu, ez}) begin
        failures++; $display("FAIL ts=%0d e=%0d got %b exp %b", type_sel, e,
          {p_nan, p_invalid, p_inf, p_ovf, p_unf, p_zero}, {en, ei, ef, eo, eu, ez});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
