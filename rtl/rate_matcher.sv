// rate_matcher: 5G NR polar rate matching of an N-bit codeword to E bits.
//
// Three steps, all realised as address arithmetic on the stored codeword,
// one output bit per cycle:
//  1. sub-block interleaver: the codeword is cut into 32 sub-blocks of
//     N/32 bits, reordered by the pattern P: y(n) = d(P(n/B)*B + n mod B),
//     B = N/32;
//  2. bit selection: E >= N repeats the buffer cyclically (e(k) = y(k mod N));
//     E < N punctures (e(k) = y(k+N-E)) when K/E <= 7/16, otherwise
//     shortens (e(k) = y(k));
//  3. bit interleaving (iBIL = 1, uplink): triangular interleaver from
//     bil_addr_gen; with iBIL = 0 the order is unchanged.
// The output is a ready/valid bit stream; out_last marks bit E-1.
//
// Origin: the three steps and the puncturing rule K/E <= 7/16 follow the
// description; the sub-block pattern and the triangular interleaver are
// the TS 38.212 ones, computed as addresses instead of memory copies (own
// choice).
module rate_matcher
  import polar_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NMAX-1:0] cw,
  input  logic [3:0]      n_log,
  input  logic [13:0]     e_len,
  input  logic [9:0]      k_len,
  input  logic            ibil,
  output logic            out_valid,
  output logic            out_bit,
  output logic            out_last,
  input  logic            out_ready
);
  logic        gen_valid;
  logic [13:0] epos;
  logic [10:0] n_len;
  logic [13:0] ypos;
  logic [9:0]  dpos;
  logic        puncture;
  logic [3:0]  b_log;

  assign n_len    = 11'(1) << n_log;
  assign puncture = (32'(k_len) * 16) <= (32'(e_len) * 7);
  assign b_log    = n_log - 4'd5;

  bil_addr_gen u_bil (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .bypass (!ibil),
    .e_len  (e_len),
    .next   (out_ready),
    .valid  (gen_valid),
    .pos    (epos),
    .last   (out_last)
  );

  always_comb begin
    // bit selection
    if (14'(n_len) <= e_len)  ypos = epos & 14'(n_len - 1);
    else if (puncture)        ypos = epos + 14'(n_len) - e_len;
    else                      ypos = epos;
    // sub-block interleaver
    dpos = 10'((32'(sbi_pattern(5'(ypos >> b_log))) << b_log) |
               (32'(ypos) & ((32'd1 << b_log) - 1)));
  end

  assign out_valid = gen_valid;
  assign out_bit   = cw[dpos];
endmodule
