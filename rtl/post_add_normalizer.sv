// Post-addition complement, leading-zero detection and normalization
// (stage 4).
//
// If the 58-bit sum is negative (only possible when the exponents were
// equal and the product was the larger magnitude) it is complemented and
// `complement` is raised for the sign selector. The 57-bit magnitude goes
// through the leading-zero detector and is shifted left so that its
// leading one sits at bit 56; `lz` is the shift count. A zero sum gives
// zero = 1 and norm = 0. Combinational.
module post_add_normalizer
  import fma_pkg::*;
(
  input  logic [ADD_W-1:0] sum,
  output logic             complement,
  output logic [NRM_W-1:0] norm,
  output logic [5:0]       lz,
  output logic             zero
);
  logic [NRM_W-1:0] mag;
  logic [5:0]       cnt;
  lzc #(.W(NRM_W), .CW(6)) u_lzd (.in(mag), .count(cnt), .zero(zero));
  always_comb begin
    complement = sum[ADD_W-1];
    mag        = complement ? NRM_W'(-sum) : sum[NRM_W-1:0];
    lz         = zero ? 6'd0 : cnt;
    norm       = mag << lz;
  end
endmodule
