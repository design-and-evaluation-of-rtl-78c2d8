// Special-case detector for the inputs (stage 1).
//
// Classifies A, B and C as zero, denormal, infinity, NaN or signalling NaN.
// Denormal inputs are flushed to zero with their sign kept, so they are also
// flagged as zero, and A's 24-bit significand (A_significand) is emitted
// already flushed. In MXINTn mode B and C hold integer blocks and are never
// classified as special. When any FP input is a NaN, nan_in is set and
// nan_word holds the NaN to propagate: the first NaN in the order A, B, C
// with its quiet bit set, keeping its sign and payload. The propagation
// order is this design's choice. Combinational.
module input_special_detector
  import fma_pkg::*;
(
  input  fp32_t       a_f,
  input  fp32_t       b_f,
  input  fp32_t       c_f,
  input  type_sel_e   type_sel,
  output fp_class_t   a_cls,
  output fp_class_t   b_cls,
  output fp_class_t   c_cls,
  output logic [23:0] a_sig,
  output logic        nan_in,
  output logic [31:0] nan_word
);
  function automatic fp_class_t classify(fp32_t f);
    fp_class_t c;
    c.denorm = (f.exp == 8'd0)   && (f.frac != '0);
    c.zero   = (f.exp == 8'd0);
    c.inf    = (f.exp == 8'hFF)  && (f.frac == '0);
    c.nan    = (f.exp == 8'hFF)  && (f.frac != '0);
    c.snan   = c.nan && !f.frac[22];
    return c;
  endfunction

  always_comb begin
    a_cls = classify(a_f);
    if (type_sel == SEL_FP32) begin
      b_cls = classify(b_f);
      c_cls = classify(c_f);
    end else begin
      b_cls = '0;
      c_cls = '0;
    end
    a_sig  = a_cls.zero ? 24'd0 : {1'b1, a_f.frac};
    nan_in = a_cls.nan || b_cls.nan || c_cls.nan;
    if (a_cls.nan)      nan_word = {a_f.sign, 8'hFF, 1'b1, a_f.frac[21:0]};
    else if (b_cls.nan) nan_word = {b_f.sign, 8'hFF, 1'b1, b_f.frac[21:0]};
    else if (c_cls.nan) nan_word = {c_f.sign, 8'hFF, 1'b1, c_f.frac[21:0]};
    else                nan_word = QNAN;
  end
endmodule
