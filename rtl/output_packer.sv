// Output selection and packing (stage 4).
//
// Chooses the FP32 result R_OUT, in this priority:
//   1. a NaN operand              -> that NaN, quieted (nan_word)
//   2. 0 * inf, or inf - inf      -> default quiet NaN 7FC00000
//   3. A infinite                 -> A
//   4. product infinite/overflows -> infinity with the product's sign
//   5. exact zero sum             -> zero; negative only if A and the
//                                    product were both negative (RNE rule)
//   6. exponent overflow          -> infinity with the result sign
//   7. exponent underflow         -> zero with the result sign (flush)
//   8. otherwise                  -> {sign, exponent, rounded fraction}
// Combinational.
module output_packer
  import fma_pkg::*;
(
  input  logic        nan_in,
  input  logic [31:0] nan_word,
  input  logic        p_invalid,
  input  logic        a_inf,
  input  logic        a_sign,
  input  logic        p_inf,
  input  logic        p_ovf,
  input  logic        p_sign,
  input  logic        sum_zero,
  input  logic        sign,
  input  logic [7:0]  exp_in,
  input  logic [22:0] frac,
  input  logic        ovf,
  input  logic        unf,
  output logic [31:0] r_out
);
  always_comb begin
    if (nan_in)
      r_out = nan_word;
    else if (p_invalid || (a_inf && p_inf && (a_sign != p_sign)))
      r_out = QNAN;
    else if (a_inf)
      r_out = {a_sign, 8'hFF, 23'd0};
    else if (p_inf || p_ovf)
      r_out = {p_sign, 8'hFF, 23'd0};
    else if (sum_zero)
      r_out = {a_sign & p_sign, 31'd0};
    else if (ovf)
      r_out = {sign, 8'hFF, 23'd0};
    else if (unf)
      r_out = {sign, 31'd0};
    else
      r_out = {sign, exp_in, frac};
  end
endmodule
