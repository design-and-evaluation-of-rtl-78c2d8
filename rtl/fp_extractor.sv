// Sign, exponent and mantissa extractor (first block of stage 1).
//
// Splits the three FP32 words A_in, B_in, C_in into sign, biased exponent
// and fraction and rebuilds the 24-bit significands of B and C with the
// hidden bit (set when the exponent is non-zero). In MXINTn mode
// (type_sel = SEL_MXINT) the raw B and C words are forwarded as the
// B_BLOCK / C_BLOCK operands of the block multiplier and the FP32
// significands are forced to zero; in FP32 mode the blocks are forced to
// zero. This operand isolation keeps the unused multiplier quiet and is a
// choice of this design. A's significand is rebuilt by the input special
// case detector, which also applies flush-to-zero. Combinational.
module fp_extractor
  import fma_pkg::*;
(
  input  logic [31:0]      a_in,
  input  logic [31:0]      b_in,
  input  logic [31:0]      c_in,
  input  type_sel_e        type_sel,
  output fp32_t            a_f,
  output fp32_t            b_f,
  output fp32_t            c_f,
  output logic [23:0]      b_sig,
  output logic [23:0]      c_sig,
  output logic [BLK_W-1:0] b_block,
  output logic [BLK_W-1:0] c_block
);
  always_comb begin
    a_f = fp32_t'(a_in);
    b_f = fp32_t'(b_in);
    c_f = fp32_t'(c_in);
    if (type_sel == SEL_FP32) begin
      b_sig   = {b_f.exp != 8'd0, b_f.frac};
      c_sig   = {c_f.exp != 8'd0, c_f.frac};
      b_block = '0;
      c_block = '0;
    end else begin
      b_sig   = '0;
      c_sig   = '0;
      b_block = b_in;
      c_block = c_in;
    end
  end
endmodule
