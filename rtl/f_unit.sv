// f_unit: min-sum check-node operation of the successive-cancellation
// decoder, f(a,b) = sgn(a) * sgn(b) * min(|a|,|b|).
//
// Purely combinational. The sign of each operand is taken from an
// "operand > 0" comparison, so a zero operand counts as negative, as in the
// comparator-and-multiplexer structure the design describes. The magnitude
// comparison uses |a| and |b| (the min-sum rule); the result never exceeds
// the operands' range, so no saturation is needed except for the single
// most-negative code, which is avoided by the LLR saturation elsewhere.
//
// Origin: follows the described f datapath; using magnitudes in the min is
// the standard min-sum reading.
module f_unit
  import polar_pkg::*;
(
  input  llr_t a,
  input  llr_t b,
  output llr_t y
);
  llr_t abs_a, abs_b, mag;
  logic pos_a, pos_b;

  always_comb begin
    pos_a = (a > 0);
    pos_b = (b > 0);
    abs_a = a[LLR_W-1] ? -a : a;
    abs_b = b[LLR_W-1] ? -b : b;
    mag   = (abs_a > abs_b) ? abs_b : abs_a;
    y     = (pos_a ^ pos_b) ? -mag : mag;
  end
endmodule
