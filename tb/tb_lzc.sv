// Test of lzc at its default width (57): every leading-one position with
// random lower bits, and zero.
module tb_lzc;
  logic [56:0] in;
  logic [5:0]  count;
  logic        zero;
  int checks = 0, failures = 0;
  lzc dut (.*);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int pos = n % 58;  // 57 means all zero
      logic [63:0] r = {$urandom, $urandom};
      in = (pos == 57) ? '0 : 57'((r | (64'h1 << pos)) & ((64'h1 << (pos + 1)) - 1));
      #1;
      checks++;
      if ((pos == 57) ? (count != 57 || !zero) : (count != 6'(56 - pos) || zero)) begin
        failures++; $display("FAIL %h -> %0d", in, count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
