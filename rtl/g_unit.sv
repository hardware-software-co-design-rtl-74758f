// g_unit: variable-node operation of the successive-cancellation decoder,
// g(a,b,u) = (1 - 2u) * a + b.
//
// Purely combinational: a is the LLR from the first half of the parent
// array, b the LLR from the second half and u the partial-sum bit of the
// left sibling. The sum is saturated to the LLR range.
//
// Origin: follows the described g datapath; the saturation is this
// design's own choice.
module g_unit
  import polar_pkg::*;
(
  input  llr_t a,
  input  llr_t b,
  input  logic u,
  output llr_t y
);
  logic signed [LLR_W+3:0] sum;

  always_comb begin
    if (u) sum = (LLR_W+4)'(b) - (LLR_W+4)'(a);
    else   sum = (LLR_W+4)'(b) + (LLR_W+4)'(a);
    y = sat_llr(sum);
  end
endmodule
