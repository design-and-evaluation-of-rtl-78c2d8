// Test of product_normalizer: fields with the leading one at every
// position (and zero); the result must have its leading one at bit 52 and
// be the input shifted by `norm`.
module tb_product_normalizer;
  import fma_pkg::*;
  logic [SIG_W-1:0] field, sig;
  logic [5:0]       norm;
  logic             zero;
  int checks = 0, failures = 0;
  product_normalizer dut (.*);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int pos = n % 54;   // 53 means zero field
      logic [63:0] r = {$urandom, $urandom};
      field = (pos == 53) ? '0 : SIG_W'((r | 64'h1 << pos) & ((64'h1 << (pos + 1)) - 1));
      #1;
      checks++;
      if (pos == 53) begin
        if (!zero) begin failures++; $display("FAIL zero"); end
      end else if (zero || norm != 6'(52 - pos) || sig != (field << (52 - pos)) || !sig[52]) begin
        failures++; $display("FAIL %h -> %h norm %0d", field, sig, norm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
