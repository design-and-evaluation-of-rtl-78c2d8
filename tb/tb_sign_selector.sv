// Exhaustive test of sign_selector.
module tb_sign_selector;
  logic a_sign, p_sign, swap, complement, sign;
  int checks = 0, failures = 0;
  sign_selector dut (.*);
  initial begin
    for (int n = 0; n < 16; n++) begin
      logic e;
      {a_sign, p_sign, swap, complement} = 4'(n);
      #1;
      e = swap ? p_sign : a_sign;
      if (complement) e = !e;
      checks++;
      if (sign != e) begin failures++; $display("FAIL %b", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
