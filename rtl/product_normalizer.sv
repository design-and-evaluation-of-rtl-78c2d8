// Product normalization (stage 2).
//
// Receives the product selected by type_sel as an unnormalized 53-bit
// significand field: the exact FP32 product (value in [1,4), one leading
// zero at most) or the MXINTn dot product magnitude (many leading zeros).
// The leading-zero detector gives `norm`, the left shift that moves the
// leading one to bit 52; the normalized significand is sig = field << norm.
// The exponent controller subtracts `norm` from the product exponent.
// A zero field gives zero = 1. Combinational.
module product_normalizer
  import fma_pkg::*;
(
  input  logic [SIG_W-1:0] field,
  output logic [SIG_W-1:0] sig,
  output logic [5:0]       norm,
  output logic             zero
);
  logic [5:0] cnt;
  lzc #(.W(SIG_W), .CW(6)) u_lzd (.in(field), .count(cnt), .zero(zero));
  always_comb begin
    norm = zero ? 6'd0 : cnt;
    sig  = field << norm;
  end
endmodule
