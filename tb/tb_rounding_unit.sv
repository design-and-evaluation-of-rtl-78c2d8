// Test of rounding_unit: round to nearest, ties to even, checked against
// an integer reference that compares the dropped part with one half ulp.
// Exact ties, all-ones significands (carry) and random values are used.
module tb_rounding_unit;
  import fma_pkg::*;
  logic [NRM_W-1:0] norm;
  logic [22:0]      frac;
  logic             carry, inexact;
  int checks = 0, failures = 0;
  rounding_unit dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [23:0] hi;
      logic [32:0] lo;
      logic [24:0] r;
      hi = {1'b1, 23'($urandom)};
      lo = {1'($urandom), $urandom};
      case (n % 5)
        0: lo = 33'h1_0000_0000;        // exact tie
        1: hi = 24'hFF_FFFF;
        2: lo = 33'h0;
        default: ;
      endcase
      norm = {hi, lo};
      #1;
      r = {1'b0, hi};
      if (lo > 33'h1_0000_0000 || (lo == 33'h1_0000_0000 && hi[0])) r = r + 1;
      checks++;
      if (carry != r[24] || frac != (r[24] ? 23'd0 : r[22:0]) || inexact != (lo != 0)) begin
        failures++; $display("FAIL %h -> %h c=%b", norm, frac, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
