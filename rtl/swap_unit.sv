// Swap logic (stage 3).
//
// Puts the operand with the larger exponent on operand_1 and the other on
// operand_2, using exponents_diff = exp(A) - exp(product); on equal
// exponents A stays on operand_1. A zero operand always goes to operand_2
// so that it aligns away. `swap` tells the sign selector that the product
// became operand_1. `shamt` is the alignment distance, saturated at 127.
// Combinational.
module swap_unit
  import fma_pkg::*;
(
  input  ext_num_t                a,
  input  ext_num_t                p,
  input  logic                    a_zero,
  input  logic                    p_zero,
  input  logic signed [EXP_W-1:0] exp_diff,
  output ext_num_t                op1,
  output ext_num_t                op2,
  output logic                    swap,
  output logic [6:0]              shamt
);
  logic [EXP_W-1:0] distance;
  always_comb begin
    if (p_zero)               swap = 1'b0;
    else if (a_zero)          swap = 1'b1;
    else                      swap = exp_diff < 0;
    op1  = swap ? p : a;
    op2  = swap ? a : p;
    distance = exp_diff < 0 ? EXP_W'(-exp_diff) : EXP_W'(exp_diff);
    if (a_zero || p_zero || distance > EXP_W'(127)) shamt = 7'd127;
    else                                        shamt = distance[6:0];
  end
endmodule
