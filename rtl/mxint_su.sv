// Sub-unit (SU) of the precision-scalable block multiplier.
//
// Multiplies one 2-bit digit of B by one 2-bit digit of C. Each digit is
// read as a signed (two's complement) digit when it is the most
// significant digit of its MXINTn element, and as an unsigned digit
// otherwise, so that a grid of SUs with shifted sums rebuilds signed
// 8-bit, 4-bit or 2-bit products. The result is in [-6, 9] and is given as
// a 5-bit two's complement number; it is forced to zero when `en` is low
// (sub-unit unused in the selected precision). Combinational.
module mxint_su (
  input  logic              en,
  input  logic [1:0]        b,
  input  logic [1:0]        c,
  input  logic              b_signed,
  input  logic              c_signed,
  output logic signed [4:0] p
);
  logic signed [2:0] bx, cx;
  always_comb begin
    bx = {b_signed & b[1], b};
    cx = {c_signed & c[1], c};
    p  = en ? 5'(bx) * 5'(cx) : 5'sd0;
  end
endmodule
