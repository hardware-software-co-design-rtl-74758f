// modulator: maps bps coded bits to one complex symbol I + jQ (BPSK, QPSK,
// 16QAM, 64QAM selected by mod_scheme 0..3).
//
// Each axis is built from the bit-to-sign multiplexers of the QPSK
// structure (bit 0 -> +1, bit 1 -> -1) scaled by the scheme's constant c
// (1/sqrt2, 1/sqrt10, 1/sqrt42 in (14,8) fixed point). Bit order and
// amplitude levels follow TS 38.211 5.1:
//   BPSK : I = Q = c(1-2b0)
//   QPSK : I = c(1-2b0), Q = c(1-2b1)
//   16QAM: I = c(1-2b0)(2-(1-2b2)), Q likewise with b1, b3
//   64QAM: I = c(1-2b0)(4-(1-2b2)(2-(1-2b4))), Q with b1, b3, b5
// bits[0] is b0. Purely combinational.
//
// Origin: the mod_scheme encoding and the sign-multiplexer structure
// follow the description; levels and scaling come from TS 38.211.
module modulator
  import polar_pkg::*;
(
  input  mod_e       mod_scheme,
  input  logic [5:0] bits,
  output llr_t       sym_i,
  output llr_t       sym_q
);
  function automatic int sgn(logic b);
    return b ? -1 : 1;
  endfunction

  int amp_i, amp_q;
  always_comb begin
    case (mod_scheme)
      MOD_BPSK: begin
        amp_i = sgn(bits[0]) * int'(C_QPSK);
        amp_q = amp_i;
      end
      MOD_QPSK: begin
        amp_i = sgn(bits[0]) * int'(C_QPSK);
        amp_q = sgn(bits[1]) * int'(C_QPSK);
      end
      MOD_QAM16: begin
        amp_i = sgn(bits[0]) * (2 - sgn(bits[2])) * int'(C_QAM16);
        amp_q = sgn(bits[1]) * (2 - sgn(bits[3])) * int'(C_QAM16);
      end
      default: begin
        amp_i = sgn(bits[0]) * (4 - sgn(bits[2]) * (2 - sgn(bits[4]))) * int'(C_QAM64);
        amp_q = sgn(bits[1]) * (4 - sgn(bits[3]) * (2 - sgn(bits[5]))) * int'(C_QAM64);
      end
    endcase
    sym_i = llr_t'(amp_i);
    sym_q = llr_t'(amp_q);
  end
endmodule
