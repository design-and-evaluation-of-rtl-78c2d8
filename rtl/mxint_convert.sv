// MXINTn conversion and precision extension (stage 2).
//
// Turns the two's complement block dot product into sign/magnitude form
// (the "complement" step) and places the magnitude at the bottom of the
// 53-bit extended significand field used by the double-precision
// addition. The field is not yet normalized: the product normalizer shifts
// it to 1.xxx, and the exponent controller supplies the matching exponent
// (shared exponents and fraction bits). Conversion is exact because the dot
// product is at most DW bits wide. Combinational.
module mxint_convert
  import fma_pkg::*;
#(
  parameter int unsigned DW = DOT_W
) (
  input  logic signed [DW-1:0] dot,
  output logic                 sign,
  output logic [SIG_W-1:0]     field,
  output logic                 zero
);
  logic [DW-1:0] mag;
  always_comb begin
    sign  = dot[DW-1];
    mag   = sign ? DW'(-dot) : DW'(dot);
    field = SIG_W'(mag);
    zero  = (dot == '0);
  end
endmodule
