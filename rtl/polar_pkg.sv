// polar_pkg: types, sizes and helper functions shared by the 5G NR polar
// encoder, rate-recover and decoder IPs.
//
// Soft values (received samples, LLRs) use a (14,8) fixed-point format:
// 14 bits, two's complement, 6 fractional bits, so 1.0 = 64. The (14,8)
// word length is the one the design's word-length study selects.
// Maximum sizes follow the 5G NR limits: N <= 1024 (nMax = 10),
// E <= 8192, list size <= 4.
// The CRC polynomials, the rate-matching sub-block pattern and the rule for
// choosing N come from the 3GPP TS 38.212 standard; the frozen-bit mask and
// the input-interleaver table are not computed here but loaded by software.
//
// Origin: the (14,8) word length, N <= 1024 and L <= 4 follow the
// description; E <= 8192 and the standard tables are from TS 38.212.
package polar_pkg;

  localparam int unsigned LLR_W    = 14;   // total soft-value width
  localparam int unsigned LLR_F    = 6;    // fractional bits
  localparam int unsigned NMAX_LOG = 10;   // log2 of largest code length
  localparam int unsigned NMAX     = 1 << NMAX_LOG;
  localparam int unsigned EMAX     = 8192; // largest rate-matched length
  localparam int unsigned KMAX     = 1023; // largest CRC-encoded block
  localparam int unsigned LMAX     = 4;    // largest list size
  localparam int unsigned CRC_MAX  = 24;   // longest CRC
  localparam int unsigned IL_MAX   = 164;  // size of the input interleaver table
  localparam int unsigned PM_W     = 24;   // path-metric width

  typedef logic signed [LLR_W-1:0] llr_t;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2,
    MOD_QAM64 = 2'd3
  } mod_e;

  // Largest representable LLR, used for shortened (known) positions.
  localparam llr_t LLR_POS_MAX = llr_t'((1 << (LLR_W-1)) - 1);
  localparam llr_t LLR_NEG_MAX = llr_t'(-(1 << (LLR_W-1)) + 1);

  // Constellation scale constants in (14,8): 1/sqrt(2), 1/sqrt(10), 1/sqrt(42).
  localparam llr_t C_QPSK  = llr_t'(45);
  localparam llr_t C_QAM16 = llr_t'(20);
  localparam llr_t C_QAM64 = llr_t'(10);

  // Bits per modulation symbol (Table of modulation options).
  function automatic int unsigned bits_per_symbol(mod_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_QAM16: return 4;
      default:   return 6;
    endcase
  endfunction

  // Generator polynomial, MSB = x^crcLen term, for crcLen 6, 11, 24.
  function automatic logic [CRC_MAX:0] crc_poly(logic [4:0] len);
    case (len)
      5'd6:    return 25'h000061;   // x^6+x^5+1
      5'd11:   return 25'h000E21;   // x^11+x^10+x^9+x^5+1
      default: return 25'h1B2B117;  // 24C: x^24+x^23+x^21+x^20+x^17+x^15+x^13+x^12+x^8+x^4+x^2+x+1
    endcase
  endfunction

  // Rate-matching sub-block interleaver pattern P(i), 32 entries.
  function automatic logic [4:0] sbi_pattern(logic [4:0] i);
    logic [4:0] p [32];
    p = '{5'd0, 5'd1, 5'd2, 5'd4, 5'd3, 5'd5, 5'd6, 5'd7,
          5'd8, 5'd16, 5'd9, 5'd17, 5'd10, 5'd18, 5'd11, 5'd19,
          5'd12, 5'd20, 5'd13, 5'd21, 5'd14, 5'd22, 5'd15, 5'd23,
          5'd24, 5'd25, 5'd26, 5'd28, 5'd27, 5'd29, 5'd30, 5'd31};
    return p[i];
  endfunction

  // Inverse of sbi_pattern.
  function automatic logic [4:0] sbi_inverse(logic [4:0] v);
    logic [4:0] r;
    r = '0;
    for (int i = 0; i < 32; i++)
      if (sbi_pattern(5'(i)) == v) r = 5'(i);
    return r;
  endfunction

  // ceil(log2(x)) for x >= 1.
  function automatic int unsigned clog2u(int unsigned x);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 31; i++)
      if ((32'd1 << i) < x) r = i + 1;
    return r;
  endfunction

  // Code length exponent n = log2(N) from K, E and nMax (TS 38.212 5.3.1).
  function automatic logic [3:0] polar_n(int unsigned k, int unsigned e, int unsigned nmax);
    int unsigned ce, n1, n2, n;
    ce = clog2u(e);
    // E <= (9/8)*2^(ce-1)  and  K/E < 9/16
    if ((8 * e <= 9 * (1 << (ce - 1))) && (16 * k < 9 * e)) n1 = ce - 1;
    else n1 = ce;
    n2 = clog2u(8 * k);
    n = n1;
    if (n2 < n) n = n2;
    if (nmax < n) n = nmax;
    if (n < 5) n = 5;
    return 4'(n);
  endfunction

  // Saturate a wide signed value into an LLR.
  function automatic llr_t sat_llr(logic signed [LLR_W+3:0] v);
    if (v > (LLR_W+4)'(LLR_POS_MAX)) return LLR_POS_MAX;
    if (v < (LLR_W+4)'(LLR_NEG_MAX)) return LLR_NEG_MAX;
    return llr_t'(v);
  endfunction

endpackage
