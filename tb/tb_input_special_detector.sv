// Test of input_special_detector: classes, flushed A significand and the
// NaN chosen for propagation, on special and random values in both modes.
module tb_input_special_detector;
  import fma_pkg::*;
  fp32_t       a_f, b_f, c_f;
  type_sel_e   type_sel;
  fp_class_t   a_cls, b_cls, c_cls;
  logic [23:0] a_sig;
  logic        nan_in;
  logic [31:0] nan_word;
  int checks = 0, failures = 0;

  input_special_detector dut (.*);

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 7))
      0: return {1'($urandom), 8'd0, 23'd0};
      1: return {1'($urandom), 8'd0, 23'($urandom) | 23'd1};
      2: return {1'($urandom), 8'hFF, 23'd0};
      3: return {1'($urandom), 8'hFF, 1'b1, 22'($urandom)};
      4: return {1'($urandom), 8'hFF, 1'b0, 22'($urandom) | 22'd1};
      default: return $urandom;
    endcase
  endfunction

  function automatic fp_class_t expect_cls(logic [31:0] w);
    fp_class_t c;
    c.zero = w[30:23] == 0;
    c.denorm = (w[30:23] == 0) && (w[22:0] != 0);
    c.inf = (w[30:23] == 8'hFF) && (w[22:0] == 0);
    c.nan = (w[30:23] == 8'hFF) && (w[22:0] != 0);
    c.snan = c.nan && !w[22];
    return c;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] a, b, c, nw;
      fp_class_t ea, eb, ec;
      a = pick(); b = pick(); c = pick();
      type_sel = type_sel_e'($urandom_range(0, 1));
      a_f = a; b_f = b; c_f = c;
      #1;
      ea = expect_cls(a);
      eb = type_sel == SEL_FP32 ? expect_cls(b) : '0;
      ec = type_sel == SEL_FP32 ? expect_cls(c) : '0;
      checks++;
      if (a_cls != ea || b_cls != eb || c_cls != ec) begin failures++; $display("FAIL cls %h %h %h", a, b, c); end
      checks++;
      if (a_sig != (ea.zero ? 24'd0 : {1'b1, a[22:0]})) begin failures++; $display("FAIL a_sig %h", a); end
      nw = ea.nan ? (a | 32'h0040_0000) : eb.nan ? (b | 32'h0040_0000) :
           ec.nan ? (c | 32'h0040_0000) : 32'h7FC0_0000;
      checks++;
      if (nan_in != (ea.nan | eb.nan | ec.nan) || (nan_in && nan_word != nw)) begin
        failures++; $display("FAIL nan %h %h %h -> %b %h", a, b, c, nan_in, nan_word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
