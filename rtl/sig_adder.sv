// Significand adder (stage 3).
//
// Adds the two aligned 58-bit two's complement operands from the
// complement and alignment unit. The field has two headroom bits, so the
// sum of two magnitudes below 2^56 never overflows and bit 57 is the sign
// of the result. Combinational; the core registers the sum in pipeline
// register 3.
module sig_adder
  import fma_pkg::*;
(
  input  logic [ADD_W-1:0] opa,
  input  logic [ADD_W-1:0] opb,
  output logic [ADD_W-1:0] sum
);
  always_comb sum = opa + opb;
endmodule
