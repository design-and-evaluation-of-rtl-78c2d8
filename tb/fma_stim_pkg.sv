// Random operand generator for the FMA testbenches.
//
// Each call draws one operation: FP32 or MXINTn mode, and a scenario that
// aims at one mechanism (plain arithmetic, cancellation, exact zero sums,
// special values, overflow, underflow, rounding ties, or raw random bits).
package fma_stim_pkg;

  typedef struct packed {
    logic        type_sel;
    logic [1:0]  mode;
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] c;
    logic [7:0]  ei;
    logic [7:0]  ew;
  } op_t;

  function automatic logic [31:0] fp(logic s, int e, logic [22:0] f);
    return {s, 8'(e), f};
  endfunction

  function automatic logic [31:0] special_val();
    case ($urandom_range(0, 11))
      0:  return 32'h0000_0000;
      1:  return 32'h8000_0000;
      2:  return 32'h7F80_0000;
      3:  return 32'hFF80_0000;
      4:  return 32'h7FC0_1234;
      5:  return 32'h7F80_0042;                          // signalling NaN
      6:  return {1'($urandom), 8'd0, 23'($urandom) | 23'd1}; // denormal
      7:  return 32'h7F7F_FFFF;
      8:  return 32'h0080_0000;
      9:  return 32'h3F80_0000;
      default: return fp(1'($urandom), $urandom_range(100, 154), 23'($urandom));
    endcase
  endfunction

  function automatic op_t gen_op();
    op_t o;
    int  sc, eb, ec, ea;
    o.type_sel = ($urandom_range(0, 9) < 6) ? 1'b0 : 1'b1;
    o.mode     = 2'($urandom);
    o.ei       = 8'($urandom_range(110, 144));
    o.ew       = 8'($urandom_range(110, 144));
    o.b        = $urandom;
    o.c        = $urandom;
    sc = $urandom_range(0, 9);
    if (!o.type_sel) begin
      eb = $urandom_range(110, 144);
      ec = $urandom_range(110, 144);
      o.b = fp(1'($urandom), eb, 23'($urandom));
      o.c = fp(1'($urandom), ec, 23'($urandom));
      ea = eb + ec - 127 + $urandom_range(0, 60) - 30;
      o.a = fp(1'($urandom), ea, 23'($urandom));
      case (sc)
        1: begin // near cancellation: A close to -B*C
          o.a = fp(~(o.b[31] ^ o.c[31]), eb + ec - 127 + $urandom_range(0, 1), 23'($urandom));
        end
        2: begin // exact: short significands, A = -B*C
          o.b = fp(1'($urandom), eb, {4'($urandom), 19'd0});
          o.c = fp(1'($urandom), ec, {4'($urandom), 19'd0});
          o.a = fp(~(o.b[31] ^ o.c[31]), eb + ec - 127, 23'd0);
          if ($urandom_range(0, 1) == 0) o.a[22:0] = 23'(({5'd16, 4'd0} | 9'(o.b[22:19])) * (9'd16 | 9'(o.c[22:19])));
        end
        3: begin
          o.a = special_val(); o.b = special_val(); o.c = special_val();
        end
        4: begin // overflow
          o.b = fp(1'($urandom), $urandom_range(200, 254), 23'($urandom));
          o.c = fp(1'($urandom), $urandom_range(60, 130), 23'($urandom));
          o.a = fp(1'($urandom), $urandom_range(200, 254), 23'($urandom));
        end
        5: begin // underflow
          o.b = fp(1'($urandom), $urandom_range(1, 60), 23'($urandom));
          o.c = fp(1'($urandom), $urandom_range(1, 80), 23'($urandom));
          o.a = ($urandom_range(0, 1) == 0) ? fp(1'($urandom), $urandom_range(0, 3), 23'($urandom))
                                             : fp(~(o.b[31] ^ o.c[31]), $urandom_range(1, 3), 23'($urandom));
        end
        6: begin // rounding tie: product is half an ulp of A
          ea = $urandom_range(100, 150);
          o.a = fp(1'($urandom), ea, 23'($urandom));
          o.b = fp(o.a[31], ea - 24, 23'd0);
          o.c = 32'h3F80_0000;
          if ($urandom_range(0, 1) == 0) o.a[22:0] = 23'h7F_FFFF;
        end
        7: begin
          o.a = $urandom; o.b = $urandom; o.c = $urandom;
        end
        default: ;
      endcase
    end else begin
      // MXINTn: A comparable to the scaled dot product most of the time.
      ea = int'(o.ei) + int'(o.ew) - 127 + $urandom_range(0, 16) - 8;
      o.a = fp(1'($urandom), ea, 23'($urandom));
      case (sc)
        1: o.a = 32'h0000_0000;
        2: o.a = special_val();
        3: begin o.ei = 8'($urandom_range(200, 255)); o.ew = 8'($urandom_range(200, 255)); end
        4: begin o.ei = 8'($urandom_range(0, 40)); o.ew = 8'($urandom_range(0, 40)); end
        5: begin o.b = 32'h0; end
        6: begin o.b = 32'h8080_8080; o.c = 32'h8080_8080; end
        7: begin o.a = $urandom; o.ei = 8'($urandom); o.ew = 8'($urandom); end
        default: ;
      endcase
    end
    return o;
  endfunction

endpackage
