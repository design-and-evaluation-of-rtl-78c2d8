// Fully-connected-layer workload on fma_top at its default parameters.
//
// What it does: computes output neurons y = bias + sum_j w_j * x_j of a
// fully connected layer, each over one 32-element block. It uses the unit
// the way an accelerator would, feeding r_out back as the next A. There
// are four formats:
//   FP32   : 32 dependent FMAs, one w_j * x_j each;
//   MXINT8 : 8 operations of 4 elements per word, sharing one pair of
//            E8M0 scales (the block's);
//   MXINT4 : 4 operations of 8 elements;
//   MXINT2 : 2 operations of 16 elements.
// The 32-element block and the E8M0 scale shared per block follow the MX
// format. Packing a block into 32-bit words, and the bias and value ranges
// below, are this test's own choices.
//
// How it works: each dependent FMA has to wait for the previous result, so
// NROWS = LAT = 5 neurons are worked on side by side. Their operations are
// issued round robin, one per clock. The result of a neuron's step then
// arrives exactly when that neuron's next step must be issued, so the pipeline
// is full on every clock. The expected values come from the exact
// reference model applied step by step. That chain runs on its own and
// never uses r_out, so one wrong step is not carried into the next check.
//
// Checks: every intermediate and final result, bit for bit; valid_out at
// each point where a result is due; the length of each group in clocks
// (NROWS * steps + LAT - 1 edges from the first issue to the last result).
// Each format and a change of format between groups must occur.
module tb_fc_layer;
  import fma_pkg::*;
  import fma_ref_pkg::*;

  localparam int NGROUPS = 48;   // groups of NROWS neurons
  localparam int LAT     = 5;
  localparam int NROWS   = LAT;  // neurons in flight, fills the pipeline
  localparam int BLK     = 32;   // elements per block

  logic        clk = 0, rst_n = 0, valid_in = 0;
  type_sel_e   type_sel = SEL_FP32;
  mx_mode_e    ctrl_in = MX_INT8;
  logic [31:0] a_in = 0, b_in = 0, c_in = 0, r_out;
  logic [7:0]  e8m0_i = 0, e8m0_w = 0;
  logic        valid_out;

  fma_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int fmt_count [4];
  int switches = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Random FP32 value with unbiased exponent in [-r, r].
  function automatic logic [31:0] rnd_fp(int r);
    int e = 127 + $signed($urandom_range(2 * r)) - r;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] w [NROWS][BLK], x [NROWS][BLK];
    logic [7:0]  ei [NROWS], ew [NROWS];
    logic [31:0] acc_ref [NROWS];
    info_t       inf;
    int          fmt, prev_fmt, steps, c0;
    mx_mode_e    md;

    foreach (fmt_count[i]) fmt_count[i] = 0;
    prev_fmt = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int g = 0; g < NGROUPS; g++) begin
      // Format of this group: 0 = FP32, 1 = MXINT8, 2 = MXINT4, 3 = MXINT2.
      fmt = (g < 4) ? g : int'($urandom_range(3));
      fmt_count[fmt]++;
      if (prev_fmt >= 0 && fmt != prev_fmt) switches++;
      prev_fmt = fmt;
      md    = (fmt == 2) ? MX_INT4 : (fmt == 3) ? MX_INT2 : MX_INT8;
      steps = (fmt == 0) ? BLK : (fmt == 1) ? BLK / 4 : (fmt == 2) ? BLK / 8 : BLK / 16;

      for (int r = 0; r < NROWS; r++) begin
        acc_ref[r] = rnd_fp(4);                 // bias
        ei[r] = 8'(120 + $urandom_range(14));   // activation block scale
        ew[r] = 8'(120 + $urandom_range(14));   // weight block scale
        for (int k = 0; k < steps; k++) begin
          x[r][k] = (fmt == 0) ? rnd_fp(6) : $urandom;
          w[r][k] = (fmt == 0) ? rnd_fp(6) : $urandom;
        end
      end

      c0 = cycle;
      for (int s = 0; s < steps; s++) begin
        for (int r = 0; r < NROWS; r++) begin
          logic [31:0] a_dut;
          if (s == 0) begin
            a_dut = acc_ref[r];
          end else begin
            // Result of this neuron's previous step is due now.
            checks++;
            if (!valid_out) begin
              failures++;
              $display("FAIL: group %0d row %0d step %0d: no result when due", g, r, s);
            end
            check($sformatf("group %0d row %0d step %0d", g, r, s - 1), r_out, acc_ref[r]);
            a_dut = r_out;
          end
          valid_in = 1;
          type_sel = (fmt == 0) ? SEL_FP32 : SEL_MXINT;
          ctrl_in  = md;
          a_in     = a_dut;
          b_in     = x[r][s];
          c_in     = w[r][s];
          e8m0_i   = ei[r];
          e8m0_w   = ew[r];
          acc_ref[r] = fma_ref(type_sel == SEL_MXINT, 2'(md), acc_ref[r], x[r][s], w[r][s],
                               ei[r], ew[r], inf);
          @(negedge clk);
        end
      end
      // Drain: the last step of each neuron.
      valid_in = 0;
      for (int r = 0; r < NROWS; r++) begin
        if (r > 0) @(negedge clk);
        checks++;
        if (!valid_out) begin
          failures++;
          $display("FAIL: group %0d row %0d: no final result when due", g, r);
        end
        check($sformatf("group %0d row %0d final y", g, r), r_out, acc_ref[r]);
      end
      // Clock count of the group: full throughput, one operation per edge.
      checks++;
      if (cycle - c0 != NROWS * steps + LAT - 1) begin
        failures++;
        $display("FAIL: group %0d took %0d edges, expected %0d", g, cycle - c0,
                 NROWS * steps + LAT - 1);
      end
      @(negedge clk);
    end

    $display("groups: fp32=%0d mxint8=%0d mxint4=%0d mxint2=%0d format_switches=%0d",
             fmt_count[0], fmt_count[1], fmt_count[2], fmt_count[3], switches);
    foreach (fmt_count[i]) begin
      checks++;
      if (fmt_count[i] == 0) failures++;
    end
    checks++;
    if (switches == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
