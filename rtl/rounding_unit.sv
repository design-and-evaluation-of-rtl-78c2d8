// Rounding unit (stage 4): round to nearest, ties to even.
//
// Takes the normalized 57-bit magnitude (leading one at bit 56), keeps the
// 24 bits [56:33], and uses guard = bit 32, round = bit 31 and sticky = OR
// of bits [30:0]. It rounds up when guard is set and any of round, sticky
// or the kept LSB is set. A carry out of the 24 bits (1.11..1 rounding up
// to 10.0) raises `carry` for the exponent adjuster and gives fraction 0.
// `inexact` reports that any dropped bit was non-zero. Combinational.
module rounding_unit
  import fma_pkg::*;
(
  input  logic [NRM_W-1:0] norm,
  output logic [22:0]      frac,
  output logic             carry,
  output logic             inexact
);
  logic [23:0] keep;
  logic        g, r, s, up;
  logic [24:0] rnd;
  always_comb begin
    keep    = norm[NRM_W-1 -: 24];
    g       = norm[NRM_W-25];
    r       = norm[NRM_W-26];
    s       = norm[NRM_W-27:0] != '0;
    up      = g && (r || s || keep[0]);
    rnd     = {1'b0, keep} + 25'(up);
    carry   = rnd[24];
    frac    = rnd[22:0];
    inexact = g || r || s;
  end
endmodule
