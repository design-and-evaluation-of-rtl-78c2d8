// Test of mxint_block_mult: random blocks in all precisions, changing every
// clock; the dot product must equal the element-wise reference one clock
// edge after the operands were applied. Extreme blocks (all most-negative
// elements) are included.
module tb_mxint_block_mult;
  import fma_pkg::*;
  import fma_ref_pkg::*;
  logic                    clk = 0;
  logic [31:0]             b_block, c_block;
  mx_mode_e                ctrl_in;
  logic signed [DOT_W-1:0] dot;
  mx_mode_e                mode_q;
  int checks = 0, failures = 0;
  int exp_dot;
  mx_mode_e exp_mode;
  logic have = 0;

  mxint_block_mult dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (int'(dot) != exp_dot || mode_q != exp_mode) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d dot=%0d exp %0d", exp_mode, dot, exp_dot);
        end
      end
      ctrl_in = mx_mode_e'($urandom_range(0, 3));
      case (n % 8)
        0: begin b_block = 32'h8080_8080; c_block = 32'h8080_8080; end
        1: begin b_block = 32'h8888_8888; c_block = 32'h8888_8888; end
        2: begin b_block = 32'hAAAA_AAAA; c_block = 32'hAAAA_AAAA; end
        3: begin b_block = 32'h7F7F_7F7F; c_block = 32'h8181_8181; end
        default: begin b_block = $urandom; c_block = $urandom; end
      endcase
      exp_dot  = mx_dot(b_block, c_block, ctrl_in);
      exp_mode = ctrl_in;
      have = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
