// Top level of the precision-scalable FMA: a synchronous wrapper around
// fma_core with every input captured in an input register and the result
// held in an output register, so that all paths run register to register.
//
// Ports follow the core: A_in, B_in, C_in (FP32 words, or MXINTn blocks in
// B and C), the shared exponents E8M0_I / E8M0_W, CTRL_in (MXINTn
// precision), type_sel (FP32 or MXINTn multiplier) and R_OUT.
// Timing: inputs sampled on clock edge k give R_OUT and valid_out after
// edge k+4 (input register, three core registers, output register); a new
// operation may start every clock. The valid bit and the asynchronous
// active-low reset, which clears only the valid bits, are this design's
// additions.
module fma_top
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
  type_sel_e   type_sel_q;
  mx_mode_e    ctrl_q;
  logic [31:0] a_q, b_q, c_q, r_core, r_q;
  logic [7:0]  ei_q, ew_q;
  logic        valid_q, v_core, valid_out_q;

  always_ff @(posedge clk) begin
    type_sel_q <= type_sel;
    ctrl_q     <= ctrl_in;
    a_q        <= a_in;
    b_q        <= b_in;
    c_q        <= c_in;
    ei_q       <= e8m0_i;
    ew_q       <= e8m0_w;
    r_q        <= r_core;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q     <= 1'b0;
      valid_out_q <= 1'b0;
    end else begin
      valid_q     <= valid_in;
      valid_out_q <= v_core;
    end
  end

  fma_core u_core (
    .clk, .rst_n, .valid_in(valid_q), .type_sel(type_sel_q), .ctrl_in(ctrl_q),
    .a_in(a_q), .b_in(b_q), .c_in(c_q), .e8m0_i(ei_q), .e8m0_w(ew_q),
    .r_out(r_core), .valid_out(v_core)
  );

  assign r_out     = r_q;
  assign valid_out = valid_out_q;
endmodule
