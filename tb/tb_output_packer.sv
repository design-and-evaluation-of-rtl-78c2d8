// Test of output_packer: random combinations of the special-case flags
// against the documented priority of result selections.
module tb_output_packer;
  logic        nan_in, p_invalid, a_inf, a_sign, p_inf, p_ovf, p_sign;
  logic        sum_zero, sign, ovf, unf;
  logic [31:0] nan_word, r_out;
  logic [7:0]  exp_in;
  logic [22:0] frac;
  int checks = 0, failures = 0;
  output_packer dut (.*);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] e;
      {nan_in, p_invalid, a_inf, p_inf, p_ovf, sum_zero, ovf, unf} = 8'($urandom) & 8'($urandom) & 8'($urandom);
      {a_sign, p_sign, sign} = 3'($urandom);
      nan_word = $urandom; exp_in = 8'($urandom_range(1, 254)); frac = 23'($urandom);
      #1;
      if (nan_in) e = nan_word;
      else if (p_invalid) e = 32'h7FC0_0000;
      else if (a_inf && p_inf && a_sign != p_sign) e = 32'h7FC0_0000;
      else if (a_inf) e = a_sign ? 32'hFF80_0000 : 32'h7F80_0000;
      else if (p_inf || p_ovf) e = p_sign ? 32'hFF80_0000 : 32'h7F80_0000;
      else if (sum_zero) e = (a_sign && p_sign) ? 32'h8000_0000 : 32'h0;
      else if (ovf) e = sign ? 32'hFF80_0000 : 32'h7F80_0000;
      else if (unf) e = sign ? 32'h8000_0000 : 32'h0;
      else e = {sign, exp_in, frac};
      checks++;
      if (r_out != e) begin failures++; $display("FAIL got %h exp %h", r_out, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
