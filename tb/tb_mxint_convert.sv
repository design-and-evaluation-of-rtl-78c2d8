// Test of mxint_convert: sign/magnitude conversion of random and extreme
// dot products.
module tb_mxint_convert;
  import fma_pkg::*;
  logic signed [DOT_W-1:0] dot;
  logic                    sign, zero;
  logic [SIG_W-1:0]        field;
  int checks = 0, failures = 0;
  mxint_convert dut (.*);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int v;
      case (n)
        0: v = 0; 1: v = 65536; 2: v = -65536; 3: v = -1; 4: v = 1;
        default: v = $urandom_range(0, 140000) - 70000;
      endcase
      dot = DOT_W'(v);
      #1;
      checks++;
      if (sign != (v < 0) || field != SIG_W'(v < 0 ? -v : v) || zero != (v == 0)) begin
        failures++; $display("FAIL %0d -> %b %h %b", v, sign, field, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
