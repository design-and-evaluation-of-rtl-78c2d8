// Complement and alignment unit (stage 3).
//
// Builds the two adder inputs in a 58-bit two's complement field:
// 2 headroom bits, the 53-bit significand and 3 guard bits. operand_1 is
// placed unchanged. operand_2 is shifted right by `shamt`; every bit shifted
// out is ORed into the least significant bit (sticky), which keeps the
// single final rounding exact. For an effective subtraction (operand signs
// differ) operand_2 is then negated. Combinational.
module complement_align
  import fma_pkg::*;
(
  input  logic [SIG_W-1:0] sig1,
  input  logic [SIG_W-1:0] sig2,
  input  logic [6:0]       shamt,
  input  logic             eff_sub,
  output logic [ADD_W-1:0] opa,
  output logic [ADD_W-1:0] opb
);
  localparam int unsigned FW = SIG_W + 3;   // 56-bit aligned field
  logic [2*FW-1:0] wide;
  logic [FW-1:0]   shifted;
  logic            sticky;
  always_comb begin
    opa = {2'b00, sig1, 3'b000};
    // Shift inside a double-width window so the lost bits stay visible.
    wide    = {sig2, 3'b000, {FW{1'b0}}} >> ((shamt > 7'(FW)) ? 7'(FW) : shamt);
    sticky  = (wide[FW-1:0] != '0);
    shifted = wide[2*FW-1:FW];
    shifted[0] = shifted[0] | sticky;
    opb = eff_sub ? ADD_W'(-{2'b00, shifted}) : {2'b00, shifted};
  end
endmodule
