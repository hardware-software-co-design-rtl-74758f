// rate_recover: inverse of the polar rate matcher; turns E received LLRs
// into the N LLRs of the mother codeword.
//
// Write phase: the E LLRs arrive in transmitted order (ready/valid, one per
// cycle when no interleaver cells are skipped). With iBIL = 1 each one is
// written to the position the triangular bit interleaver had taken it
// from (bit deinterleaving), otherwise in order.
// Read phase: N LLRs are produced in codeword order, one per cycle. For
// codeword position m the sub-block deinterleaver finds the circular-buffer
// index n = P^-1(m/B)*B + m mod B (B = N/32); bit selection then gives
//   E >= N     : e(n)                      (the first N values are used)
//   punctured  : 0 for n < N-E, else e(n-(N-E))   (K/E <= 7/16)
//   shortened  : e(n) for n < E, else the largest positive LLR
// (a shortened bit is a known 0).
//
// Origin: the inverse steps follow the description, with the punctured
// zeros placed first and the shortened large values last so that this
// block inverts the rate matcher exactly; for E >= N only the first N
// values are used, as described.
module rate_recover
  import polar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  n_log,
  input  logic [13:0] e_len,
  input  logic [9:0]  k_len,
  input  logic        ibil,
  // received LLRs, transmitted order
  input  logic        in_valid,
  input  llr_t        in_llr,
  output logic        in_ready,
  // recovered LLRs, codeword order
  output logic        out_valid,
  output llr_t        out_llr,
  output logic        out_last,
  input  logic        out_ready
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ} state_e;
  state_e state;

  llr_t        mem [EMAX];
  logic        gen_valid, gen_last;
  logic [13:0] epos;
  logic [10:0] m, n_len;
  logic [10:0] nidx;
  logic [3:0]  b_log;
  logic        puncture;

  assign n_len    = 11'(1) << n_log;
  assign b_log    = n_log - 4'd5;
  assign puncture = (32'(k_len) * 16) <= (32'(e_len) * 7);

  bil_addr_gen u_bil (
    .clk(clk), .rst_n(rst_n), .start(start), .bypass(!ibil), .e_len(e_len),
    .next(in_valid && state == S_WRITE), .valid(gen_valid), .pos(epos),
    .last(gen_last)
  );

  assign in_ready = (state == S_WRITE) && gen_valid;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[epos[12:0]] <= in_llr;
  end

  always_comb begin
    nidx = 11'((32'(sbi_inverse(5'(m >> b_log))) << b_log) |
               (32'(m) & ((32'd1 << b_log) - 1)));
    if (14'(n_len) <= e_len) out_llr = mem[13'(nidx)];
    else if (puncture) begin
      if (14'(nidx) < 14'(n_len) - e_len) out_llr = '0;
      else out_llr = mem[13'(14'(nidx) - (14'(n_len) - e_len))];
    end else begin
      if (14'(nidx) < e_len) out_llr = mem[13'(nidx)];
      else out_llr = LLR_POS_MAX;
    end
  end

  assign out_valid = (state == S_READ);
  assign out_last  = (state == S_READ) && (m == n_len - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      m     <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) state <= S_WRITE;
        S_WRITE: if (in_valid && in_ready && gen_last) begin
          m     <= '0;
          state <= S_READ;
        end
        S_READ: if (out_ready) begin
          if (m == n_len - 1) state <= S_IDLE;
          else m <= m + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
