// Shared types and constants of the precision-scalable FMA.
//
// The unit computes R = A + B*C on FP32 numbers, or R = A + (block dot
// product of B and C) when B and C carry MXINTn blocks. Internally the
// product and A are held as "extended" numbers: a sign, a signed unbiased
// exponent and a 53-bit significand (double-precision resolution), so that
// the addition loses nothing before the single final rounding.
//
// Encodings that are this design's own choice: the CTRL_in precision codes,
// the 12-bit internal exponent, the quiet-NaN value and the number of
// fraction bits of MXINT4/MXINT2 (n-2, as for MXINT8 which has 6).
package fma_pkg;

  // Internal signed exponent width and extended significand width.
  localparam int unsigned EXP_W = 12;
  localparam int unsigned SIG_W = 53;
  // Adder width: 2 headroom bits + 53 significand bits + 3 guard bits.
  localparam int unsigned ADD_W = 58;
  localparam int unsigned NRM_W = ADD_W - 1;   // magnitude of the sum
  localparam int signed   FP_BIAS = 127;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Width of one MXINTn operand word (B_in / C_in) and of the block
  // dot product produced by the block multiplier.
  localparam int unsigned BLK_W = 32;
  localparam int unsigned DOT_W = 20;

  // type_sel: which multiplier feeds the addition.
  typedef enum logic {
    SEL_FP32  = 1'b0,
    SEL_MXINT = 1'b1
  } type_sel_e;

  // CTRL_in: precision of the MXINTn block multiplier.
  typedef enum logic [1:0] {
    MX_INT8 = 2'd0,   // 4 elements of 8 bits per 32-bit word
    MX_INT4 = 2'd1,   // 8 elements of 4 bits
    MX_INT2 = 2'd2,   // 16 elements of 2 bits
    MX_RSVD = 2'd3    // reserved, behaves as MX_INT8
  } mx_mode_e;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  // Class of one FP32 input after flush-to-zero.
  typedef struct packed {
    logic zero;     // true zero or flushed denormal
    logic denorm;   // exponent 0, fraction non-zero
    logic inf;
    logic nan;
    logic snan;     // signalling NaN (quiet bit clear)
  } fp_class_t;

  // Extended number: value = sig / 2^(SIG_W-1) * 2^exp.
  typedef struct packed {
    logic                    sign;
    logic signed [EXP_W-1:0] exp;
    logic [SIG_W-1:0]        sig;
  } ext_num_t;

  // Fraction bits of one MXINTn element: n-2.
  function automatic int unsigned mx_frac_bits(mx_mode_e m);
    case (m)
      MX_INT4: return 2;
      MX_INT2: return 0;
      default: return 6;
    endcase
  endfunction

endpackage
