// Test of swap_unit: operand order, swap flag and saturated shift for
// random exponent differences and zero operands.
module tb_swap_unit;
  import fma_pkg::*;
  ext_num_t a, p, op1, op2;
  logic a_zero, p_zero, swap;
  logic signed [EXP_W-1:0] exp_diff;
  logic [6:0] shamt;
  int checks = 0, failures = 0;
  swap_unit dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int d, es;
      logic esw;
      a = {$urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom};
      a_zero = ($urandom_range(0, 7) == 0);
      p_zero = ($urandom_range(0, 7) == 0);
      d = (n % 2) ? $urandom_range(0, 20) - 10 : $urandom_range(0, 600) - 300;
      exp_diff = EXP_W'(d);
      #1;
      esw = p_zero ? 1'b0 : a_zero ? 1'b1 : (d < 0);
      es = (a_zero || p_zero) ? 127 : ((d < 0 ? -d : d) > 127 ? 127 : (d < 0 ? -d : d));
      checks++;
      if (swap != esw || op1 != (esw ? p : a) || op2 != (esw ? a : p) || int'(shamt) != es) begin
        failures++; $display("FAIL d=%0d az=%b pz=%b swap=%b shamt=%0d", d, a_zero, p_zero, swap, shamt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
