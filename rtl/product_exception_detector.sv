// Product exception logic (stage 2).
//
// Classifies the product B*C (FP32 mode) or the scaled block dot product
// (MXINTn mode) before the addition:
//   p_nan     : B or C is a NaN (FP32 mode only),
//   p_invalid : 0 * infinity,
//   p_inf     : infinity times a non-zero number,
//   p_ovf     : finite product of at least 2^129; no FP32 addend can bring
//               the sum back into range, so the result is infinity,
//   p_unf     : non-zero product below 2^-126 (the normal range); by the
//               flush-to-zero policy it is replaced by a signed zero,
//   p_zero    : the product enters the addition as zero (zero operand,
//               zero dot product or underflow).
// p_exp is the unbiased exponent of the normalized product. The threshold
// 2^129 for p_ovf is this design's choice; it keeps results equal to those
// of an exact fused operation. Combinational.
module product_exception_detector
  import fma_pkg::*;
(
  input  type_sel_e               type_sel,
  input  fp_class_t               b_cls,
  input  fp_class_t               c_cls,
  input  logic                    field_zero,
  input  logic signed [EXP_W-1:0] p_exp,
  output logic                    p_nan,
  output logic                    p_invalid,
  output logic                    p_inf,
  output logic                    p_ovf,
  output logic                    p_unf,
  output logic                    p_zero
);
  logic op_zero, special;
  always_comb begin
    if (type_sel == SEL_FP32) begin
      p_nan     = b_cls.nan || c_cls.nan;
      p_invalid = !p_nan && ((b_cls.zero && c_cls.inf) || (b_cls.inf && c_cls.zero));
      p_inf     = !p_nan && !p_invalid && (b_cls.inf || c_cls.inf);
      op_zero   = b_cls.zero || c_cls.zero;
    end else begin
      p_nan     = 1'b0;
      p_invalid = 1'b0;
      p_inf     = 1'b0;
      op_zero   = field_zero;
    end
    special = p_nan || p_invalid || p_inf;
    p_ovf   = !special && !op_zero && (p_exp >= EXP_W'(129));
    p_unf   = !special && !op_zero && (p_exp < -EXP_W'(126));
    p_zero  = !special && (op_zero || p_unf);
  end
endmodule
