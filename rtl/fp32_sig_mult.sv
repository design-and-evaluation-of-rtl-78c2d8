// FP32 significand multiplier (stage 1).
//
// Multiplies the two 24-bit significands 1.f of B and C into the exact
// 48-bit product, whose value lies in [1, 4) with the binary point after
// bit 46. No rounding happens here: the product keeps full precision into
// the addition, as a fused multiply-add requires. Combinational; the core
// registers the product in pipeline register 1.
module fp32_sig_mult #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]   b_sig,
  input  logic [W-1:0]   c_sig,
  output logic [2*W-1:0] prod
);
  always_comb prod = (2*W)'(b_sig) * (2*W)'(c_sig);
endmodule
