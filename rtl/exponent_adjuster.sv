// Exponent adjuster (stage 4).
//
// Forms the biased result exponent from the exponent of operand_1:
//   E = exp1 + 1 - lz + carry + 127,
// where +1 accounts for the adder's headroom bit, lz is the normalization
// shift and carry comes from rounding. E >= 255 is an overflow (result
// becomes infinity); E <= 0 is an underflow, and since subnormals are not
// supported the result is flushed to a signed zero. Underflow is judged
// after rounding. Combinational.
module exponent_adjuster
  import fma_pkg::*;
(
  input  logic signed [EXP_W-1:0] exp1,
  input  logic [5:0]              lz,
  input  logic                    carry,
  output logic [7:0]              exp_out,
  output logic                    ovf,
  output logic                    unf
);
  logic signed [EXP_W:0] e;
  always_comb begin
    e       = (EXP_W+1)'(exp1) + (EXP_W+1)'(1 + FP_BIAS)
              - (EXP_W+1)'($signed({1'b0, lz})) + (EXP_W+1)'($signed({1'b0, carry}));
    ovf     = e >= (EXP_W+1)'(255);
    unf     = e <= (EXP_W+1)'(0);
    exp_out = e[7:0];
  end
endmodule
