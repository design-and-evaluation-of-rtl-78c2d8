// Precision-scalable fused multiply-add core: R = A + B*C.
//
// type_sel = SEL_FP32 : B and C are FP32 numbers; their significands are
//   multiplied exactly (24x24 bits) and the product is added to A.
// type_sel = SEL_MXINT: B and C each carry one 32-bit block of MXINTn
//   mantissas (precision from CTRL_in: 4 x MXINT8, 8 x MXINT4 or
//   16 x MXINT2) with the shared E8M0 exponents E8M0_I (B) and E8M0_W (C).
//   The block multiplier forms the integer dot product sum_k b_k*c_k, which
//   is scaled by 2^(E8M0_I + E8M0_W - 254 - 2(n-2)) and added to the FP32 A.
// Both modes share the rest of the datapath: the product is held at
// double-precision resolution (53-bit significand), aligned with A, added,
// normalized and rounded once to FP32 (round to nearest, ties to even).
// Denormal inputs, product underflow and results below 2^-126 are flushed to
// signed zero; infinities and NaNs follow IEEE 754.
//
// Pipeline: four stages separated by three registers, one operation per
// clock; r_out/valid_out show the result 3 clock edges after the inputs.
//   stage 1: extraction, input special cases, FP32 multiplication and the
//            sub-unit array of the block multiplier        | REG 1
//   stage 2: block accumulation, conversion, product multiplexer,
//            normalization, exponent control, product exceptions | REG 2
//   stage 3: swap, complement and alignment, addition       | REG 3
//   stage 4: complement, LZD, normalization, rounding, exponent adjust,
//            sign selection, output packing (combinational to r_out)
// The valid bit and its reset are this design's additions; the datapath
// registers are not reset.
// A few block outputs are left unconnected on purpose:
// * mx_zero: a zero product is taken from the multiplexed field instead;
// * p_unf: an underflowed product is already flushed into p_zero;
// * inexact: no exception flags are brought out;
// * the exponent of the second adder operand: after the swap only the
//   distance matters.
module fma_core
  import fma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_in,
  input  type_sel_e   type_sel,
  input  mx_mode_e    ctrl_in,
  input  logic [31:0] a_in,
  input  logic [31:0] b_in,
  input  logic [31:0] c_in,
  input  logic [7:0]  e8m0_i,
  input  logic [7:0]  e8m0_w,
  output logic [31:0] r_out,
  output logic        valid_out
);
  // ---------------------------------------------------------------- stage 1
  fp32_t            a_f, b_f, c_f;
  logic [23:0]      b_sig, c_sig, a_sig;
  logic [BLK_W-1:0] b_block, c_block;
  fp_class_t        a_cls, b_cls, c_cls;
  logic             nan_in;
  logic [31:0]      nan_word;
  logic [47:0]      prod;

  fp_extractor u_extract (
    .a_in, .b_in, .c_in, .type_sel,
    .a_f, .b_f, .c_f, .b_sig, .c_sig, .b_block, .c_block
  );

  input_special_detector u_in_special (
    .a_f, .b_f, .c_f, .type_sel,
    .a_cls, .b_cls, .c_cls, .a_sig, .nan_in, .nan_word
  );

  fp32_sig_mult #(.W(24)) u_fp32_mult (.b_sig, .c_sig, .prod);

  // Stage 1 and 2 of the block multiplier; it holds its own REG 1 part.
  logic signed [DOT_W-1:0] dot;
  mx_mode_e                mx_mode_q;
  mxint_block_mult u_mxint (
    .clk, .b_block, .c_block, .ctrl_in, .dot, .mode_q(mx_mode_q)
  );

  typedef struct packed {
    type_sel_e   type_sel;
    logic        a_sign;
    logic [7:0]  a_exp;
    logic [23:0] a_sig;
    fp_class_t   a_cls;
    logic [7:0]  b_exp;
    logic [7:0]  c_exp;
    fp_class_t   b_cls;
    fp_class_t   c_cls;
    logic        bc_sign;
    logic [47:0] prod;
    logic        nan_in;
    logic [31:0] nan_word;
    logic [7:0]  e8m0_i;
    logic [7:0]  e8m0_w;
  } reg1_t;

  reg1_t r1;
  logic  v1, v2, v3;

  always_ff @(posedge clk) begin
    r1.type_sel <= type_sel;
    r1.a_sign   <= a_f.sign;
    r1.a_exp    <= a_f.exp;
    r1.a_sig    <= a_sig;
    r1.a_cls    <= a_cls;
    r1.b_exp    <= b_f.exp;
    r1.c_exp    <= c_f.exp;
    r1.b_cls    <= b_cls;
    r1.c_cls    <= c_cls;
    r1.bc_sign  <= b_f.sign ^ c_f.sign;
    r1.prod     <= prod;
    r1.nan_in   <= nan_in;
    r1.nan_word <= nan_word;
    r1.e8m0_i   <= e8m0_i;
    r1.e8m0_w   <= e8m0_w;
  end

  // ---------------------------------------------------------------- stage 2
  logic             mx_sign, mx_zero;
  logic [SIG_W-1:0] mx_field, p_field, p_sig;
  logic             p_sign, field_zero;
  logic [5:0]       norm;
  logic signed [EXP_W-1:0] a_exp_u, p_exp, exp_diff;
  logic             p_nan, p_invalid, p_inf, p_ovf, p_unf, p_zero;

  mxint_convert u_mx_conv (.dot, .sign(mx_sign), .field(mx_field), .zero(mx_zero));

  // Product multiplexer (type_sel).
  always_comb begin
    if (r1.type_sel == SEL_MXINT) begin
      p_field = mx_field;
      p_sign  = mx_sign;
    end else begin
      p_field = {r1.prod, 5'b0};
      p_sign  = r1.bc_sign;
    end
  end

  product_normalizer u_p_norm (.field(p_field), .sig(p_sig), .norm, .zero(field_zero));

  exp_align_ctrl u_exp_ctrl (
    .type_sel(r1.type_sel), .mode(mx_mode_q),
    .a_exp(r1.a_exp), .b_exp(r1.b_exp), .c_exp(r1.c_exp),
    .e8m0_i(r1.e8m0_i), .e8m0_w(r1.e8m0_w), .norm,
    .a_exp_u, .p_exp, .exp_diff
  );

  product_exception_detector u_p_exc (
    .type_sel(r1.type_sel), .b_cls(r1.b_cls), .c_cls(r1.c_cls),
    .field_zero, .p_exp,
    .p_nan, .p_invalid, .p_inf, .p_ovf, .p_unf, .p_zero
  );

  typedef struct packed {
    ext_num_t                a;
    ext_num_t                p;
    logic                    a_zero;
    logic                    p_zero;
    logic signed [EXP_W-1:0] exp_diff;
    logic                    nan_in;
    logic [31:0]             nan_word;
    logic                    p_invalid;
    logic                    a_inf;
    logic                    p_inf;
    logic                    p_ovf;
  } reg2_t;

  reg2_t r2;
  always_ff @(posedge clk) begin
    r2.a         <= '{sign: r1.a_sign, exp: a_exp_u, sig: {r1.a_sig, 29'd0}};
    r2.p         <= '{sign: p_sign, exp: p_exp, sig: p_zero ? '0 : p_sig};
    r2.a_zero    <= r1.a_cls.zero;
    r2.p_zero    <= p_zero;
    r2.exp_diff  <= exp_diff;
    r2.nan_in    <= r1.nan_in || p_nan;
    r2.nan_word  <= r1.nan_word;
    r2.p_invalid <= p_invalid;
    r2.a_inf     <= r1.a_cls.inf;
    r2.p_inf     <= p_inf;
    r2.p_ovf     <= p_ovf;
  end

  // ---------------------------------------------------------------- stage 3
  ext_num_t         op1, op2;
  logic             swap;
  logic [6:0]       shamt;
  logic [ADD_W-1:0] opa, opb, sum;

  swap_unit u_swap (
    .a(r2.a), .p(r2.p), .a_zero(r2.a_zero), .p_zero(r2.p_zero),
    .exp_diff(r2.exp_diff), .op1, .op2, .swap, .shamt
  );

  complement_align u_align (
    .sig1(op1.sig), .sig2(op2.sig), .shamt,
    .eff_sub(op1.sign ^ op2.sign), .opa, .opb
  );

  sig_adder u_add (.opa, .opb, .sum);

  typedef struct packed {
    logic [ADD_W-1:0]        sum;
    logic signed [EXP_W-1:0] exp1;
    logic                    swap;
    logic                    a_sign;
    logic                    p_sign;
    logic                    nan_in;
    logic [31:0]             nan_word;
    logic                    p_invalid;
    logic                    a_inf;
    logic                    p_inf;
    logic                    p_ovf;
  } reg3_t;

  reg3_t r3;
  always_ff @(posedge clk) begin
    r3.sum       <= sum;
    r3.exp1      <= op1.exp;
    r3.swap      <= swap;
    r3.a_sign    <= r2.a.sign;
    r3.p_sign    <= r2.p.sign;
    r3.nan_in    <= r2.nan_in;
    r3.nan_word  <= r2.nan_word;
    r3.p_invalid <= r2.p_invalid;
    r3.a_inf     <= r2.a_inf;
    r3.p_inf     <= r2.p_inf;
    r3.p_ovf     <= r2.p_ovf;
  end

  // ---------------------------------------------------------------- stage 4
  logic             complement, sum_zero, carry, inexact, ovf, unf, sign;
  logic [NRM_W-1:0] nrm;
  logic [5:0]       lz;
  logic [22:0]      frac;
  logic [7:0]       exp_out;

  post_add_normalizer u_post_norm (
    .sum(r3.sum), .complement, .norm(nrm), .lz, .zero(sum_zero)
  );

  rounding_unit u_round (.norm(nrm), .frac, .carry, .inexact);

  exponent_adjuster u_exp_adj (.exp1(r3.exp1), .lz, .carry, .exp_out, .ovf, .unf);

  sign_selector u_sign (
    .a_sign(r3.a_sign), .p_sign(r3.p_sign), .swap(r3.swap),
    .complement, .sign
  );

  output_packer u_pack (
    .nan_in(r3.nan_in), .nan_word(r3.nan_word), .p_invalid(r3.p_invalid),
    .a_inf(r3.a_inf), .a_sign(r3.a_sign), .p_inf(r3.p_inf), .p_ovf(r3.p_ovf),
    .p_sign(r3.p_sign), .sum_zero, .sign, .exp_in(exp_out), .frac,
    .ovf, .unf, .r_out
  );

  // Valid pipeline.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v1 <= valid_in;
      v2 <= v1;
      v3 <= v2;
    end
  end
  assign valid_out = v3;

endmodule
