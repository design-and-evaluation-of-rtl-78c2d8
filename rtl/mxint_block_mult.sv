// MXINTn precision-scalable block multiplier.
//
// B_BLOCK and C_BLOCK are 32-bit words holding a block of MXINTn element
// mantissas in two's complement: 4 x MXINT8, 8 x MXINT4 or 16 x MXINT2,
// element k in the k-th n-bit field from the LSB. CTRL_in selects the
// precision. The word is split into 4 lanes of 8 bits; each lane has a
// 4 x 4 grid of 2-bit sub-units (SUs), SU(i,j) multiplying digit i of B by
// digit j of C:
//   MXINT8: all 16 SUs of a lane form one 8x8 product, SU(i,j) weighted by
//           2^(2(i+j)); digit 3 is signed.
//   MXINT4: the two diagonal 2x2 groups form two 4x4 products, weight
//           2^(2(i%2 + j%2)); odd digits are signed; the other SUs idle.
//   MXINT2: only SU(i,i) is used, every digit is signed, weight 1.
// The SU results are registered (this is the pipeline register the core
// places inside the block multiplier), and the next stage sums all of them
// with their weights into `dot`, the exact integer dot product
// sum_k b_k * c_k of the block. Scaling by the shared exponents and the
// fraction bits is left to the exponent controller.
//
// Timing: `dot` and `mode_q` belong to the operands presented one clock
// edge earlier. Throughput one block per cycle.
//
// The document gives the SU idea, the modes and the register position; the
// lane/grid arrangement, the 2-bit SU size and summing all products into a
// single dot product are this design's choices. With 32-bit words only half
// (MXINT4) or a quarter (MXINT2) of the SUs can find operands.
module mxint_block_mult
  import fma_pkg::*;
#(
  parameter int unsigned W  = BLK_W,   // operand word width, multiple of 8
  parameter int unsigned DW = DOT_W    // dot product width
) (
  input  logic                 clk,
  input  logic [W-1:0]         b_block,
  input  logic [W-1:0]         c_block,
  input  mx_mode_e             ctrl_in,
  output logic signed [DW-1:0] dot,
  output mx_mode_e             mode_q
);
  localparam int unsigned LANES = W / 8;

  logic signed [4:0] su_p [LANES][4][4];
  logic signed [4:0] su_q [LANES][4][4];

  function automatic logic su_active(mx_mode_e m, int i, int j);
    case (m)
      MX_INT4: return (i / 2) == (j / 2);
      MX_INT2: return i == j;
      default: return 1'b1;
    endcase
  endfunction

  function automatic logic digit_signed(mx_mode_e m, int i);
    case (m)
      MX_INT4: return (i % 2) == 1;
      MX_INT2: return 1'b1;
      default: return i == 3;
    endcase
  endfunction

  function automatic int unsigned su_shift(mx_mode_e m, int i, int j);
    case (m)
      MX_INT4: return 2 * ((i % 2) + (j % 2));
      MX_INT2: return 0;
      default: return 2 * (i + j);
    endcase
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    for (genvar i = 0; i < 4; i++) begin : g_row
      for (genvar j = 0; j < 4; j++) begin : g_col
        mxint_su u_su (
          .en       (su_active(ctrl_in, i, j)),
          .b        (b_block[8*l + 2*i +: 2]),
          .c        (c_block[8*l + 2*j +: 2]),
          .b_signed (digit_signed(ctrl_in, i)),
          .c_signed (digit_signed(ctrl_in, j)),
          .p        (su_p[l][i][j])
        );
      end
    end
  end

  // Pipeline register between the SU array and the block accumulation.
  always_ff @(posedge clk) begin
    su_q   <= su_p;
    mode_q <= ctrl_in;
  end

  // Block accumulation.
  always_comb begin
    dot = '0;
    for (int l = 0; l < int'(LANES); l++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          dot += DW'(su_q[l][i][j]) <<< su_shift(mode_q, i, j);
  end
endmodule
