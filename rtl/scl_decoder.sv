// scl_decoder: CRC-aided successive-cancellation list (CA-SCL) decoder
// core for 5G NR polar codes, N = 2^n_log up to 1024, list size up to L.
//
// Data structures (one set per path slot l):
//   - LLR memory: layer lambda (1..n) of the decoding tree holds
//     beta = 2^(n-lambda) LLRs at addresses beta..2beta-1; the channel
//     LLRs (layer 0) are a single shared memory.
//   - ptr[l][lambda]: which slot's LLR memory holds layer lambda of path l.
//     A new path copies its parent's pointer row instead of the LLRs;
//     every path writes only its own memory, and only the lowest layer a
//     phase starts from is ever read through a pointer, so shared arrays
//     are never overwritten while still needed.
//   - partial sums C0/C1 (bit estimates of the left/right child at every
//     layer, same addressing), decided bits uhat and the path metric PM;
//     these are registers and are copied whole when a path splits.
// Per phase phi (bit channel) the core
//   1. recomputes the LLRs of layers s..n for every active path, one f or
//      g operation per cycle (s = 1 for phi = 0, else n - trailing zeros
//      of phi; the layer-s step is g, the others f);
//   2. decides u_phi: a frozen bit is 0 for all paths (PM grows by |P| if
//      the LLR disagrees); a parity-check bit (pc_mask) is likewise not
//      forked but takes y0 of the path's own 5-bit parity register
//      (TS 38.212: rotated every phase, every decided bit XORed into
//      y0, copied when a path is cloned); an information bit forks
//      every path and keeps the list_size best candidates (scl_prune);
//      surviving forks are placed
//      in free slots and take a copy of their parent;
//   3. for odd phi combines the partial sums upwards (B operation: left
//      child = C0 xor C1, right child = C1), one layer per cycle.
// After phase N-1 the K information bits of every path are gathered in
// channel order and de-interleaved through the pi lookup port (pi(k) = k
// when the input interleaver is off), every candidate is CRC-checked, and
// the path with the smallest metric among those that pass is returned;
// if none passes, the smallest-metric path is returned and crc_ok is low.
// Latency is about L*n*N + 2N + 3K cycles.
//
// Origin: the flow (initialise, activate the first path, LLR update,
// continue frozen/unfrozen paths, partial-sum update, CRC check and
// selection) and the per-path arrays follow the described list decoder;
// pointer rows instead of copying LLR arrays, registers for the partial
// sums and one operation per cycle are this design's own choices; the
// parity-check register rule is from TS 38.212.
// Candidates are kept by smallest penalty metric.
module scl_decoder
  import polar_pkg::*;
#(
  parameter int unsigned L = LMAX
) (
  input  logic              clk,
  input  logic              rst_n,
  // channel LLR load (layer 0)
  input  logic              llr_we,
  input  logic [9:0]        llr_addr,
  input  llr_t              llr_wdata,
  // job
  input  logic              start,
  input  logic [3:0]        n_log,
  input  logic [9:0]        k_len,
  input  logic [4:0]        crc_len,
  input  logic [3:0]        list_size,
  input  logic [NMAX-1:0]   info_mask,
  input  logic [NMAX-1:0]   pc_mask,
  // de-interleaver lookup
  output logic [9:0]        pi_rd_k,
  input  logic [9:0]        pi_rd_pi,
  // result
  output logic              done,
  output logic              crc_ok,
  output logic [KMAX-1:0]   out_bits
);
  localparam int unsigned PW = (L > 1) ? $clog2(L) : 1;
  typedef logic [PW-1:0] pidx_t;

  typedef enum logic [3:0] {
    S_IDLE, S_CALC, S_DECIDE, S_UPDC, S_GATHER, S_CRC_START, S_CRC_WAIT, S_SELECT
  } state_e;
  state_e state;

  // ---------------------------------------------------------------- storage
  llr_t            ch_mem [NMAX];
  llr_t            p_mem  [L*NMAX];
  logic [NMAX-1:0] c0   [L];
  logic [NMAX-1:0] c1   [L];
  logic [NMAX-1:0] uhat [L];
  logic [PM_W-1:0] pm   [L];
  pidx_t           ptr  [L][NMAX_LOG+1];
  logic [L-1:0]    active;
  llr_t            leaf [L];
  logic [KMAX-1:0] blk  [L];

  always_ff @(posedge clk) begin
    if (llr_we) ch_mem[llr_addr] <= llr_wdata;
  end

  // ------------------------------------------------------------- counters
  logic [10:0] phi;
  logic [3:0]  lam, s_lam;
  logic [9:0]  idx;
  pidx_t       p;
  logic [9:0]  beta;
  logic [10:0] n_len;
  logic [9:0]  kcnt;

  assign n_len = 11'(1) << n_log;
  assign beta  = 10'(11'(1) << (n_log - lam));

  // start layer of a phase
  function automatic logic [3:0] start_layer(logic [10:0] ph, logic [3:0] n);
    logic [3:0] tz;
    if (ph == 0) return 4'd1;
    tz = 0;
    for (int b = 0; b < 11; b++)
      if (ph[b] == 1'b0 && tz == 4'(b)) tz = tz + 1;
    return n - tz;
  endfunction

  // ------------------------------------------------------------ f/g datapath
  pidx_t src;
  llr_t  op_a, op_b, f_y, g_y, pe_y;
  logic  g_u, use_g;
  logic [10:0] phase_lam;

  always_comb begin
    src = (lam == s_lam) ? ptr[p][lam - 1] : p;
    if (lam == 4'd1) begin
      op_a = ch_mem[idx];
      op_b = ch_mem[idx + beta];
    end else begin
      op_a = p_mem[{src, 10'(2*beta + idx)}];
      op_b = p_mem[{src, 10'(3*beta + idx)}];
    end
    g_u       = c0[p][beta + idx];
    phase_lam = phi >> (n_log - lam);
    use_g     = phase_lam[0];
    pe_y      = use_g ? g_y : f_y;
  end

  f_unit u_f (.a(op_a), .b(op_b), .y(f_y));
  g_unit u_g (.a(op_a), .b(op_b), .u(g_u), .y(g_y));

  always_ff @(posedge clk) begin
    if (state == S_CALC) p_mem[{p, beta + idx}] <= pe_y;
  end

  // ----------------------------------------------------------- decision
  logic [PM_W-1:0] pf0 [L];
  logic [PM_W-1:0] pf1 [L];
  logic [L-1:0]    k0, k1;
  logic            frozen;

  assign frozen = !info_mask[phi[9:0]];

  // parity-check register per path (y0 = bit 0), rotated every phase
  logic [4:0]      ysr [L];
  logic            pcbit;
  assign pcbit = pc_mask[phi[9:0]];
  function automatic logic [4:0] yrot(logic [4:0] y);
    return {y[0], y[4:1]};
  endfunction

  scl_prune #(.L(L)) u_prune (
    .active(active), .pm(pm), .leaf(leaf), .list_size(list_size),
    .prob_f0(pf0), .prob_f1(pf1), .keep0(k0), .keep1(k1)
  );

  // slot assignment: k-th path that keeps both branches -> k-th free slot
  logic [L-1:0]    new_active, clone_en;
  pidx_t           clone_src [L];
  logic [L-1:0]    new_bit;
  logic [PM_W-1:0] new_pm [L];

  always_comb begin
    int nfree, ndup;
    pidx_t dup_list [L];
    ndup = 0;
    nfree = 0;
    for (int l = 0; l < L; l++) begin
      dup_list[l] = '0;
      clone_en[l] = 1'b0;
      clone_src[l] = '0;
      new_bit[l] = 1'b0;
      new_pm[l] = pm[l];
      new_active[l] = 1'b0;
    end
    if (frozen) begin
      for (int l = 0; l < L; l++) begin
        // frozen bit: 0; parity-check bit: the path's own parity y0
        new_active[l] = active[l];
        new_bit[l]    = pcbit && yrot(ysr[l])[0];
        new_pm[l]     = new_bit[l] ? pf1[l] : pf0[l];
      end
    end else begin
      for (int l = 0; l < L; l++)
        if (k0[l] && k1[l]) begin
          dup_list[ndup] = pidx_t'(l);
          ndup++;
        end
      nfree = 0;
      for (int l = 0; l < L; l++) begin
        if (k0[l] || k1[l]) begin
          new_active[l] = 1'b1;
          new_bit[l]    = !k0[l];
          new_pm[l]     = k0[l] ? pf0[l] : pf1[l];
        end else begin
          if (nfree < ndup) begin
            new_active[l] = 1'b1;
            clone_en[l]   = 1'b1;
            clone_src[l]  = dup_list[nfree];
            new_bit[l]    = 1'b1;
            new_pm[l]     = pf1[dup_list[nfree]];
          end
          nfree++;
        end
      end
    end
  end

  // ------------------------------------------------------ partial-sum update
  logic [9:0]  upd_beta;
  logic [3:0]  upd_lam;
  logic [10:0] upd_q;
  logic        upd_col;
  assign upd_beta = 10'(11'(1) << (n_log - upd_lam));
  assign upd_col  = upd_q[1];

  // Partial-sum candidates: for every child width bt = 2^q the parent cells
  // [2bt, 3bt) take C0 xor C1 of the child cells [bt, 2bt) and the cells
  // [3bt, 4bt) take C1 of [bt, 2bt). The ranges of different q do not
  // overlap, so all of them sit in one vector per path; upd_rng selects the
  // range of the layer being updated.
  logic [NMAX-1:0] upd_rng;
  logic [L-1:0][NMAX-1:0] upd_val;
  assign upd_rng = ({NMAX{1'b1}} << {upd_beta, 1'b0}) & ~({NMAX{1'b1}} << {upd_beta, 2'b00});
  for (genvar gl = 0; gl < L; gl++) begin : g_upd
    assign upd_val[gl][1:0] = 2'b00;
    for (genvar gq = 0; gq < NMAX_LOG - 1; gq++) begin : g_q
      localparam int unsigned BT = 1 << gq;
      assign upd_val[gl][4*BT-1:2*BT] = {c1[gl][2*BT-1:BT], c0[gl][2*BT-1:BT] ^ c1[gl][2*BT-1:BT]};
    end
  end

  // ------------------------------------------------------ CRC of candidates
  logic [L-1:0]       crc_done_v;
  logic               crc_start;
  logic [CRC_MAX-1:0] crc_rem [L];
  logic [L-1:0]       crc_seen;

  for (genvar l = 0; l < L; l++) begin : g_crc
    logic busy_unused;
    crc_unit u_crc (
      .clk(clk), .rst_n(rst_n), .start(crc_start), .crc_len(crc_len),
      .blk({CRC_MAX'(0), blk[l]}), .nbits(11'(k_len)), .busy(busy_unused),
      .done(crc_done_v[l]), .rem(crc_rem[l])
    );
  end

  assign pi_rd_k = kcnt;

  // ----------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phi       <= '0;
      lam       <= 4'd1;
      s_lam     <= 4'd1;
      idx       <= '0;
      p         <= '0;
      kcnt      <= '0;
      active    <= '0;
      done      <= 1'b0;
      crc_ok    <= 1'b0;
      out_bits  <= '0;
      crc_start <= 1'b0;
      crc_seen  <= '0;
      upd_lam   <= '0;
      upd_q     <= '0;
      for (int l = 0; l < L; l++) begin
        c0[l]   <= '0;
        ysr[l]  <= '0;
        c1[l]   <= '0;
        uhat[l] <= '0;
        pm[l]   <= '0;
        leaf[l] <= '0;
        blk[l]  <= '0;
        for (int j = 0; j <= NMAX_LOG; j++) ptr[l][j] <= pidx_t'(l);
      end
    end else begin
      done      <= 1'b0;
      crc_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          // initialise data structures, assign the initial path
          active <= L'(1);
          for (int l = 0; l < L; l++) begin
            c0[l]   <= '0;
            ysr[l]  <= '0;
            c1[l]   <= '0;
            uhat[l] <= '0;
            pm[l]   <= '0;
            blk[l]  <= '0;
            for (int j = 0; j <= NMAX_LOG; j++) ptr[l][j] <= pidx_t'(l);
          end
          phi   <= '0;
          s_lam <= 4'd1;
          lam   <= 4'd1;
          idx   <= '0;
          p     <= '0;
          state <= S_CALC;
        end

        S_CALC: begin
          if (lam == n_log) leaf[p] <= pe_y;
          if (idx == beta - 1) begin
            idx <= '0;
            ptr[p][lam] <= p;
            if (lam == n_log) begin
              // next active path, or decide
              logic found;
              found = 1'b0;
              for (int l = 0; l < L; l++)
                if (!found && l > int'(p) && active[l]) begin
                  found = 1'b1;
                  p     <= pidx_t'(l);
                end
              lam <= s_lam;
              if (!found) state <= S_DECIDE;
            end else lam <= lam + 1'b1;
          end else idx <= idx + 1'b1;
        end

        S_DECIDE: begin
          for (int l = 0; l < L; l++) begin
            logic [NMAX-1:0] n0, n1, nu;
            logic [4:0]      ny;
            n0 = clone_en[l] ? c0[clone_src[l]]   : c0[l];
            n1 = clone_en[l] ? c1[clone_src[l]]   : c1[l];
            nu = clone_en[l] ? uhat[clone_src[l]] : uhat[l];
            ny = yrot(clone_en[l] ? ysr[clone_src[l]] : ysr[l]);
            ny[0] = ny[0] ^ new_bit[l];
            ysr[l] <= ny;
            if (new_active[l]) begin
              if (phi[0]) n1[1] = new_bit[l];
              else        n0[1] = new_bit[l];
              nu[phi[9:0]] = new_bit[l];
            end
            c0[l]   <= n0;
            c1[l]   <= n1;
            uhat[l] <= nu;
            pm[l]   <= new_pm[l];
            if (clone_en[l])
              for (int j = 0; j <= NMAX_LOG; j++) ptr[l][j] <= ptr[clone_src[l]][j];
          end
          active <= new_active;
          if (phi[0] && n_log >= 2) begin
            upd_lam <= n_log;
            upd_q   <= phi;
            state   <= S_UPDC;
          end else if (phi == n_len - 1) begin
            kcnt  <= '0;
            phi   <= '0;
            state <= S_GATHER;
          end else begin
            phi   <= phi + 1'b1;
            s_lam <= start_layer(phi + 1'b1, n_log);
            lam   <= start_layer(phi + 1'b1, n_log);
            p     <= first_active(new_active);
            state <= S_CALC;
          end
        end

        S_UPDC: begin
          // B operation of layer upd_lam into layer upd_lam-1, all paths:
          // only the parent cells [2*beta, 4*beta) change
          for (int l = 0; l < L; l++) begin
            if (upd_col) c1[l] <= (c1[l] & ~upd_rng) | (upd_val[l] & upd_rng);
            else         c0[l] <= (c0[l] & ~upd_rng) | (upd_val[l] & upd_rng);
          end
          if (upd_q[1] && upd_lam >= 4'd3) begin
            upd_lam <= upd_lam - 1'b1;
            upd_q   <= upd_q >> 1;
          end else if (phi == n_len - 1) begin
            kcnt  <= '0;
            phi   <= '0;
            state <= S_GATHER;
          end else begin
            phi   <= phi + 1'b1;
            s_lam <= start_layer(phi + 1'b1, n_log);
            lam   <= start_layer(phi + 1'b1, n_log);
            p     <= first_active(active);
            state <= S_CALC;
          end
        end

        S_GATHER: begin
          if (info_mask[phi[9:0]]) begin
            for (int l = 0; l < L; l++) blk[l][pi_rd_pi] <= uhat[l][phi[9:0]];
            kcnt <= kcnt + 1'b1;
          end
          if (phi == n_len - 1) state <= S_CRC_START;
          else phi <= phi + 1'b1;
        end

        S_CRC_START: begin
          crc_start <= 1'b1;
          crc_seen  <= '0;
          state     <= S_CRC_WAIT;
        end

        S_CRC_WAIT: begin
          crc_seen <= crc_seen | crc_done_v;
          if (&(crc_seen | crc_done_v)) state <= S_SELECT;
        end

        S_SELECT: begin
          logic [PM_W-1:0] best_pm, any_pm;
          logic            found_ok, found_any;
          pidx_t           best, any_best;
          found_ok  = 1'b0;
          found_any = 1'b0;
          best      = '0;
          any_best  = '0;
          best_pm   = '0;
          any_pm    = '0;
          for (int l = 0; l < L; l++) begin
            if (active[l] && (!found_any || pm[l] < any_pm)) begin
              any_pm    = pm[l];
              any_best  = pidx_t'(l);
              found_any = 1'b1;
            end
            if (active[l] && crc_rem[l] == '0 && (!found_ok || pm[l] < best_pm)) begin
              best_pm  = pm[l];
              best     = pidx_t'(l);
              found_ok = 1'b1;
            end
          end
          out_bits <= found_ok ? blk[best] : blk[any_best];
          crc_ok   <= found_ok;
          done     <= 1'b1;
          state    <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  function automatic pidx_t first_active(logic [L-1:0] a);
    first_active = '0;
    for (int l = L - 1; l >= 0; l--)
      if (a[l]) first_active = pidx_t'(l);
  endfunction

  // A phase never runs with an empty list.
  assert property (@(posedge clk) disable iff (!rst_n) state == S_CALC |-> active != '0);
endmodule
