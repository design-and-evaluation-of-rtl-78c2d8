// Test of exponent_adjuster: biased exponent, overflow and underflow limits
// for random operand exponents, shifts and rounding carries.
module tb_exponent_adjuster;
  import fma_pkg::*;
  logic signed [EXP_W-1:0] exp1;
  logic [5:0] lz;
  logic carry, ovf, unf;
  logic [7:0] exp_out;
  int checks = 0, failures = 0;
  exponent_adjuster dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int e, x;
      x = (n % 2) ? $urandom_range(0, 700) - 350 : $urandom_range(0, 280) - 140;
      exp1 = EXP_W'(x);
      lz = 6'($urandom_range(0, 57));
      carry = 1'($urandom);
      #1;
      e = x + 1 - int'(lz) + int'(carry) + 127;
      checks++;
      if (ovf != (e >= 255) || unf != (e <= 0) || (!ovf && !unf && exp_out != 8'(e))) begin
        failures++; $display("FAIL exp1=%0d lz=%0d c=%b -> %0d", x, lz, carry, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
