// Reference model of the FMA for the testbenches.
//
// Computes R = A + B*C (FP32 mode) or R = A + dot(B,C) * 2^(Ei+Ew-254-2F)
// (MXINTn mode) exactly, as one wide integer whose LSB weighs 2^-OFF, and
// rounds the exact sum once to FP32 (nearest, ties to even) with the same
// flush-to-zero rules as the hardware: denormal inputs, products below
// 2^-126 and results below 2^-126 become signed zeros. It shares no code
// with the RTL; the MXINTn dot product is taken element by element.
// It also reports which mechanisms an operation exercises.
package fma_ref_pkg;

  localparam int MW  = 720;
  localparam int OFF = 330;
  typedef logic signed [MW-1:0] big_t;

  typedef struct packed {
    logic nan_prop;     // a NaN operand propagated
    logic invalid;      // 0*inf or inf-inf
    logic inf_op;       // an infinite operand gave an infinite result
    logic p_ovf;        // finite product of at least 2^129
    logic p_unf;        // non-zero product flushed to zero
    logic denorm_in;    // a denormal input was flushed
    logic r_ovf;        // rounding overflow to infinity
    logic r_unf;        // result flushed to zero
    logic zero_sum;     // exact zero result from non-zero operands
    logic swap;         // product exponent above A's
    logic neg_sum;      // equal exponents, product larger, opposite signs
    logic cancel;       // result exponent at least 2 below the larger operand
    logic round_carry;  // rounding carried into the exponent
    logic tie;          // exact half-way case
  } info_t;

  function automatic int frac_bits(logic [1:0] mode);
    case (mode)
      2'd1: return 2;
      2'd2: return 0;
      default: return 6;
    endcase
  endfunction

  function automatic int elem_bits(logic [1:0] mode);
    case (mode)
      2'd1: return 4;
      2'd2: return 2;
      default: return 8;
    endcase
  endfunction

  // Integer dot product of two 32-bit MXINTn blocks.
  function automatic int mx_dot(logic [31:0] b, logic [31:0] c, logic [1:0] mode);
    int n = elem_bits(mode);
    int s = 0;
    for (int k = 0; k < 32 / n; k++) begin
      int bv = 0, cv = 0;
      for (int t = 0; t < n; t++) begin
        if (b[k*n + t]) bv += (t == n - 1) ? -(1 << t) : (1 << t);
        if (c[k*n + t]) cv += (t == n - 1) ? -(1 << t) : (1 << t);
      end
      s += bv * cv;
    end
    return s;
  endfunction

  function automatic int msb_of(big_t v);
    for (int i = MW - 1; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  function automatic logic [31:0] fma_ref(logic type_sel, logic [1:0] mode,
                                          logic [31:0] a, logic [31:0] b, logic [31:0] c,
                                          logic [7:0] ei, logic [7:0] ew, output info_t info);
    logic        sa = a[31], sb = b[31], sc = c[31], sp;
    int          ea = a[30:23], eb = b[30:23], ec = c[30:23];
    logic        a_nan = (ea == 255) && (a[22:0] != 0);
    logic        b_nan = !type_sel && (eb == 255) && (b[22:0] != 0);
    logic        c_nan = !type_sel && (ec == 255) && (c[22:0] != 0);
    logic        a_inf = (ea == 255) && (a[22:0] == 0);
    logic        b_inf = !type_sel && (eb == 255) && (b[22:0] == 0);
    logic        c_inf = !type_sel && (ec == 255) && (c[22:0] == 0);
    logic        a_zero = (ea == 0);
    logic        b_zero = !type_sel && (eb == 0);
    logic        c_zero = !type_sel && (ec == 0);
    logic        p_zero;
    big_t        av, pv, s, mag, keep, rem, half;
    int          m, e, be, pe, ae;
    info_t       inf = '0;

    inf.denorm_in = (a_zero && a[22:0] != 0) ||
                    (b_zero && b[22:0] != 0) || (c_zero && c[22:0] != 0);

    if (a_nan || b_nan || c_nan) begin
      inf.nan_prop = 1;
      info = inf;
      if (a_nan) return a | 32'h0040_0000;
      if (b_nan) return b | 32'h0040_0000;
      return c | 32'h0040_0000;
    end

    // Product value (and its sign) as an exact integer.
    if (!type_sel) begin
      sp = sb ^ sc;
      if ((b_zero && c_inf) || (b_inf && c_zero)) begin
        inf.invalid = 1; info = inf; return 32'h7FC0_0000;
      end
      if (b_inf || c_inf) begin
        if (a_inf && (sa != sp)) begin inf.invalid = 1; info = inf; return 32'h7FC0_0000; end
        inf.inf_op = 1; info = inf; return {sp, 8'hFF, 23'd0};
      end
      p_zero = b_zero || c_zero;
      pv = '0;
      if (!p_zero) begin
        pv = big_t'({1'b1, b[22:0]}) * big_t'({1'b1, c[22:0]});
        pv = pv <<< (eb + ec - 300 + OFF);
      end
    end else begin
      int d = mx_dot(b, c, mode);
      sp = d < 0;
      p_zero = (d == 0);
      pv = big_t'(d < 0 ? -d : d);
      pv = pv <<< (int'(ei) + int'(ew) - 254 - 2 * frac_bits(mode) + OFF);
    end
    if (a_inf) begin inf.inf_op = 1; info = inf; return {sa, 8'hFF, 23'd0}; end

    // Product range checks (flush below 2^-126).
    if (!p_zero) begin
      pe = msb_of(pv) - OFF;
      if (pe < -126) begin p_zero = 1; pv = '0; inf.p_unf = 1; end
      else if (pe >= 129) inf.p_ovf = 1;
    end
    av = '0;
    if (!a_zero) av = big_t'({1'b1, a[22:0]}) <<< (ea - 150 + OFF);
    ae = a_zero ? -10000 : ea - 127;
    pe = p_zero ? -10000 : msb_of(pv) - OFF;
    inf.swap = !a_zero && !p_zero && (pe > ae);
    inf.neg_sum = !a_zero && !p_zero && (pe == ae) && (sa != sp) && (pv > av);

    s = (sa ? -av : av) + (sp ? -pv : pv);
    if (s == 0) begin
      inf.zero_sum = !a_zero && !p_zero;
      info = inf;
      return {sa & sp, 31'd0};
    end
    mag = s < 0 ? -s : s;
    m = msb_of(mag);
    e = m - OFF;
    inf.cancel = (e < ((ae > pe ? ae : pe) - 1));
    keep = mag >>> (m - 23);
    rem  = mag & ((big_t'(1) <<< (m - 23)) - 1);
    half = big_t'(1) <<< (m - 24);
    inf.tie = (rem == half);
    if ((rem > half) || ((rem == half) && keep[0])) keep = keep + 1;
    if (keep[24]) begin keep = keep >>> 1; e = e + 1; inf.round_carry = 1; end
    be = e + 127;
    info = inf;
    if (be >= 255) begin
      info.r_ovf = !inf.p_ovf;
      return {s < 0, 8'hFF, 23'd0};
    end
    if (be <= 0) begin info.r_unf = 1; return {s < 0, 31'd0}; end
    return {s < 0, 8'(be), keep[22:0]};
  endfunction

endpackage
