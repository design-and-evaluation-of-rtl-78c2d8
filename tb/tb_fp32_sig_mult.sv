// Test of fp32_sig_mult: exact 24x24-bit products against 64-bit integer
// multiplication, including the extreme significands.
module tb_fp32_sig_mult;
  logic [23:0] b_sig, c_sig;
  logic [47:0] prod;
  int checks = 0, failures = 0;
  fp32_sig_mult dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint unsigned e;
      b_sig = (n < 4) ? ((n % 2) ? 24'hFFFFFF : 24'h800000) : 24'($urandom) | 24'h800000;
      c_sig = (n < 4) ? ((n / 2) ? 24'hFFFFFF : 24'h800000) : 24'($urandom);
      #1;
      e = longint'(b_sig) * longint'(c_sig);
      checks++;
      if (prod != e[47:0]) begin failures++; $display("FAIL %h*%h=%h", b_sig, c_sig, prod); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
