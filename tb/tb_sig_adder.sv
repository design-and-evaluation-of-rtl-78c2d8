// Test of sig_adder: random 58-bit additions, including carries through
// the whole width.
module tb_sig_adder;
  import fma_pkg::*;
  logic [ADD_W-1:0] opa, opb, sum;
  int checks = 0, failures = 0;
  sig_adder dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [63:0] x = {$urandom, $urandom}, y = {$urandom, $urandom};
      if (n % 4 == 0) y = -x + 64'($urandom_range(0, 3));
      opa = x[ADD_W-1:0]; opb = y[ADD_W-1:0];
      #1;
      checks++;
      if (sum != ADD_W'(x + y)) begin failures++; $display("FAIL %h+%h=%h", opa, opb, sum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
