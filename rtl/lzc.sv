// Leading-zero detector (LZD).
//
// Counts the zeros above the most significant one of `in`. An all-zero
// input gives count = W and zero = 1. Purely combinational; the priority
// scan is written as a loop and synthesizes to a priority encoder. The
// design uses it after the product multiplexer (stage 2) and after the
// adder (stage 4).
module lzc #(
  parameter int unsigned W  = 57,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  in,
  output logic [CW-1:0] count,
  output logic          zero
);
  always_comb begin
    count = CW'(W);
    for (int i = 0; i < int'(W); i++) begin
      if (in[i]) count = CW'(W - 1 - i);
    end
    zero = (in == '0);
  end
endmodule
