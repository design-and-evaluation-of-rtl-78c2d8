// Test of post_add_normalizer: positive and negative sums with the leading
// one at every position; magnitude, complement flag and shift are checked.
module tb_post_add_normalizer;
  import fma_pkg::*;
  logic [ADD_W-1:0] sum;
  logic             complement, zero;
  logic [NRM_W-1:0] norm;
  logic [5:0]       lz;
  int checks = 0, failures = 0;
  post_add_normalizer dut (.*);
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int pos = n % 58;  // 57 means zero
      logic [63:0] r = {$urandom, $urandom};
      logic [NRM_W-1:0] mag;
      logic neg = 1'($urandom);
      mag = (pos == 57) ? '0 : NRM_W'((r | (64'h1 << pos)) & ((64'h1 << (pos + 1)) - 1));
      sum = neg ? -{1'b0, mag} : {1'b0, mag};
      #1;
      checks++;
      if (pos == 57) begin
        if (!zero) begin failures++; $display("FAIL zero"); end
      end else if (zero || complement != neg || lz != 6'(56 - pos) || norm != (mag << (56 - pos))) begin
        failures++; $display("FAIL sum=%h norm=%h lz=%0d", sum, norm, lz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
