// Exhaustive test of the 2-bit sub-unit: all digits, signedness flags and
// the enable.
module tb_mxint_su;
  logic              en, b_signed, c_signed;
  logic [1:0]        b, c;
  logic signed [4:0] p;
  int checks = 0, failures = 0;
  mxint_su dut (.*);
  initial begin
    for (int n = 0; n < 128; n++) begin
      int bv, cv, e;
      {en, b_signed, c_signed, b, c} = 7'(n);
      #1;
      bv = (b_signed && b[1]) ? int'(b) - 4 : int'(b);
      cv = (c_signed && c[1]) ? int'(c) - 4 : int'(c);
      e = en ? bv * cv : 0;
      checks++;
      if (int'(p) != e) begin failures++; $display("FAIL en=%b %b%b b=%0d c=%0d p=%0d exp %0d", en, b_signed, c_signed, b, c, p, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
