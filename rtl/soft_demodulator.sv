// soft_demodulator: turns one received symbol I + jQ into bps bit LLRs
// (positive = bit 0), for the schemes of the modulator.
//
// Max-log approximation without noise-variance scaling: the list decoder
// that follows uses min-sum arithmetic and is insensitive to a common
// scale of its inputs, so only the shape of the LLR curves matters.
//   BPSK : L0 = I + Q
//   QPSK : L0 = I, L1 = Q
//   16QAM: L0 = I, L1 = Q, L2 = 2c - |I|, L3 = 2c - |Q|          (c = 1/sqrt10)
//   64QAM: L0 = I, L1 = Q, L2 = 4c - |I|, L3 = 4c - |Q|,
//          L4 = 2c - ||I| - 4c|, L5 = 2c - ||Q| - 4c|          (c = 1/sqrt42)
// Values are (14,8) fixed point and saturate. Purely combinational;
// unused outputs are zero.
//
// Origin: soft demodulation is only named in the description; the max-log
// form without noise scaling is this design's own choice.
module soft_demodulator
  import polar_pkg::*;
(
  input  mod_e mod_scheme,
  input  llr_t sym_i,
  input  llr_t sym_q,
  output llr_t llr [6]
);
  typedef logic signed [LLR_W+3:0] wide_t;

  function automatic wide_t absw(wide_t v);
    return (v < 0) ? -v : v;
  endfunction

  wide_t wi, wq, c16, c64;
  always_comb begin
    wi  = wide_t'(sym_i);
    wq  = wide_t'(sym_q);
    c16 = wide_t'(C_QAM16);
    c64 = wide_t'(C_QAM64);
    for (int b = 0; b < 6; b++) llr[b] = '0;
    case (mod_scheme)
      MOD_BPSK: llr[0] = sat_llr(wi + wq);
      MOD_QPSK: begin
        llr[0] = sym_i;
        llr[1] = sym_q;
      end
      MOD_QAM16: begin
        llr[0] = sym_i;
        llr[1] = sym_q;
        llr[2] = sat_llr(2 * c16 - absw(wi));
        llr[3] = sat_llr(2 * c16 - absw(wq));
      end
      default: begin
        llr[0] = sym_i;
        llr[1] = sym_q;
        llr[2] = sat_llr(4 * c64 - absw(wi));
        llr[3] = sat_llr(4 * c64 - absw(wq));
        llr[4] = sat_llr(2 * c64 - absw(absw(wi) - 4 * c64));
        llr[5] = sat_llr(2 * c64 - absw(absw(wq) - 4 * c64));
      end
    endcase
  end
endmodule
