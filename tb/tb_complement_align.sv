// Test of complement_align: the aligned operand must be the true shifted
// value with the sticky bit ORed into the LSB, negated for subtraction.
// Shifts cover 0..127, including shifts past the whole field.
module tb_complement_align;
  import fma_pkg::*;
  logic [SIG_W-1:0] sig1, sig2;
  logic [6:0]       shamt;
  logic             eff_sub;
  logic [ADD_W-1:0] opa, opb;
  int checks = 0, failures = 0;
  complement_align dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [255:0] full, mask;
      logic [ADD_W-1:0] e;
      logic st;
      sig1 = {1'b1, 52'({$urandom, $urandom})};
      sig2 = (n % 13 == 0) ? '0 : {1'b1, 52'({$urandom, $urandom})};
      if (n % 5 == 0) sig2[30:0] = '0;
      shamt = (n % 3 == 0) ? 7'($urandom) : 7'($urandom_range(0, 60));
      eff_sub = 1'($urandom);
      #1;
      full = 256'({sig2, 3'b000}) << 128;
      full = full >> shamt;
      mask = (256'h1 << 128) - 1;
      st = (full & mask) != 0;
      e = ADD_W'(full >> 128) | ADD_W'(st);
      if (eff_sub) e = -e;
      checks++;
      if (opa != {2'b00, sig1, 3'b000} || opb != e) begin
        failures++; $display("FAIL sh=%0d sub=%b got %h exp %h", shamt, eff_sub, opb, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
