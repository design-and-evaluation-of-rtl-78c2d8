// Exponent and alignment controller (stage 2).
//
// Computes the unbiased exponent of the normalized product and of A, and
// their difference exponents_diff = exp(A) - exp(product), which sets the
// alignment shift of the addition stage.
//   FP32 mode : bit 52 of the product field has weight 2^(eB + eC - 254 + 1)
//               (the 48-bit product of two 1.f significands lies in [1,4)).
//   MXINT mode: bit 0 of the field has weight
//               2^(E8M0_I + E8M0_W - 254 - 2F), F = n-2 fraction bits of one
//               element, so bit 52 has that weight times 2^52.
// In both cases the normalizer's shift `norm` is then subtracted. E8M0
// exponents use bias 127. Combinational; all results are signed EXP_W-bit.
module exp_align_ctrl
  import fma_pkg::*;
(
  input  type_sel_e               type_sel,
  input  mx_mode_e                mode,
  input  logic [7:0]              a_exp,
  input  logic [7:0]              b_exp,
  input  logic [7:0]              c_exp,
  input  logic [7:0]              e8m0_i,
  input  logic [7:0]              e8m0_w,
  input  logic [5:0]              norm,
  output logic signed [EXP_W-1:0] a_exp_u,
  output logic signed [EXP_W-1:0] p_exp,
  output logic signed [EXP_W-1:0] exp_diff
);
  logic signed [EXP_W-1:0] p_top;
  always_comb begin
    a_exp_u = EXP_W'($signed({1'b0, a_exp})) - EXP_W'(FP_BIAS);
    if (type_sel == SEL_FP32)
      p_top = EXP_W'($signed({1'b0, b_exp})) + EXP_W'($signed({1'b0, c_exp}))
              - EXP_W'(2 * FP_BIAS - 1);
    else
      p_top = EXP_W'($signed({1'b0, e8m0_i})) + EXP_W'($signed({1'b0, e8m0_w}))
              - EXP_W'(2 * FP_BIAS) - EXP_W'(2 * mx_frac_bits(mode)) + EXP_W'(SIG_W - 1);
    p_exp    = p_top - EXP_W'($signed({1'b0, norm}));
    exp_diff = a_exp_u - p_exp;
  end
endmodule
