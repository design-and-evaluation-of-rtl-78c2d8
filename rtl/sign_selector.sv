// Sign selection logic (stage 4).
//
// The sum carries the sign of operand_1 (A's sign, or the product's sign
// when the swap logic put the product first), inverted when the adder's
// result had to be complemented. Combinational.
module sign_selector (
  input  logic a_sign,
  input  logic p_sign,
  input  logic swap,
  input  logic complement,
  output logic sign
);
  always_comb sign = (swap ? p_sign : a_sign) ^ complement;
endmodule
