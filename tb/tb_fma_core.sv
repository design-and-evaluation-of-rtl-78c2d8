// Test of fma_core, the FMA without the wrapper registers.
//
// Streams NOPS random operations (one per clock, with occasional idle
// cycles) through the unit, FP32 and MXINT8/4/2 mixed at random so that the
// mode changes between neighbouring operations. Every result is compared
// bit for bit with the exact reference model, and every result must appear
// LAT = 3 rising clock edges after it was applied: the first edge loads
// pipeline register 1, the third register 3 (stage 4 is combinational). Each mechanism of
// the design (both multipliers, every precision, mode switches, NaN,
// invalid, infinities, product overflow and underflow, result overflow and
// flush, denormal inputs, swap, negative sums, cancellation, rounding
// carry, ties, exact zeros) is counted; one that never happened is a
// failure.
module tb_fma_core;
  import fma_pkg::*;
  import fma_ref_pkg::*;
  import fma_stim_pkg::*;

  localparam int NOPS = 30000;
  localparam int LAT  = 3;
  localparam int NMECH = 20;

  logic        clk = 0, rst_n = 0, valid_in = 0;
  type_sel_e   type_sel = SEL_FP32;
  mx_mode_e    ctrl_in = MX_INT8;
  logic [31:0] a_in = 0, b_in = 0, c_in = 0, r_out;
  logic [7:0]  e8m0_i = 0, e8m0_w = 0;
  logic        valid_out;

  fma_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int mech [NMECH];
  string mech_name [NMECH] = '{"fp32", "mxint8", "mxint4", "mxint2", "type_switch",
    "precision_switch", "nan_propagate", "invalid", "inf_operand", "product_overflow",
    "product_underflow", "result_overflow", "result_flush", "denormal_input", "swap",
    "negative_sum", "cancellation", "round_carry", "tie", "exact_zero"};

  typedef struct { logic [31:0] exp; int issue; op_t op; } exp_t;
  exp_t q[$];

  always @(posedge clk) cycle <= cycle + 1;

  // Checker.
  always @(negedge clk) begin
    if (valid_out) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", r_out);
      end else begin
        e = q.pop_front();
        if (r_out !== e.exp) begin
          failures++;
          if (failures < 20)
            $display("FAIL: ts=%0d mode=%0d a=%h b=%h c=%h ei=%h ew=%h got %h exp %h",
                     e.op.type_sel, e.op.mode, e.op.a, e.op.b, e.op.c, e.op.ei, e.op.ew, r_out, e.exp);
        end
        checks++;
        if (cycle - e.issue != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - e.issue, LAT);
        end
      end
    end
  end

  initial begin
    op_t o, prev;
    info_t inf;
    exp_t e;
    foreach (mech[i]) mech[i] = 0;
    prev = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      if ($urandom_range(0, 15) == 0) begin
        valid_in = 0;
        a_in = $urandom; b_in = $urandom;
        @(negedge clk);
      end
      o = gen_op();
      valid_in = 1;
      type_sel = type_sel_e'(o.type_sel);
      ctrl_in  = mx_mode_e'(o.mode);
      a_in = o.a; b_in = o.b; c_in = o.c; e8m0_i = o.ei; e8m0_w = o.ew;
      e.exp = fma_ref(o.type_sel, o.mode, o.a, o.b, o.c, o.ei, o.ew, inf);
      e.issue = cycle;       // edges counted from the one that samples the inputs
      e.op = o;
      q.push_back(e);
      if (!o.type_sel) mech[0]++;
      else if (o.mode == 2'd1) mech[2]++;
      else if (o.mode == 2'd2) mech[3]++;
      else mech[1]++;
      if (n > 0 && o.type_sel != prev.type_sel) mech[4]++;
      if (n > 0 && o.type_sel && prev.type_sel && o.mode != prev.mode) mech[5]++;
      if (inf.nan_prop) mech[6]++;
      if (inf.invalid) mech[7]++;
      if (inf.inf_op) mech[8]++;
      if (inf.p_ovf) mech[9]++;
      if (inf.p_unf) mech[10]++;
      if (inf.r_ovf) mech[11]++;
      if (inf.r_unf) mech[12]++;
      if (inf.denorm_in) mech[13]++;
      if (inf.swap) mech[14]++;
      if (inf.neg_sum) mech[15]++;
      if (inf.cancel) mech[16]++;
      if (inf.round_carry) mech[17]++;
      if (inf.tie) mech[18]++;
      if (inf.zero_sum) mech[19]++;
      prev = o;
      @(negedge clk);
    end
    valid_in = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    for (int i = 0; i < NMECH; i++) begin
      $display("mechanism %-18s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never exercised", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NOPS * 2 + 1000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
