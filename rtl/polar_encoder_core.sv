// polar_encoder_core: builds the N-bit information vector u and multiplies
// it by the generator matrix G_N = [1 0; 1 1]^(kron n).
//
// Phase 1 (N cycles): walk the bit channels 0..N-1; where the information
// mask has a 1 the next block bit is placed in u, otherwise u is a frozen 0.
// Phase 2 (N cycles): one codeword bit per cycle, c(j) = XOR of u(i)*G(i,j)
// over all rows i. The generator column is not stored: G_N(i,j) = 1
// exactly when the bits of j are a subset of the bits of i, so each column
// is formed on the fly and all N products of a column are reduced in the
// same cycle. Latency from start to done is 2N+1 cycles.
// The information mask (the positions of the K most reliable channels)
// comes from software. Parity-check (PC) positions, also from software,
// carry the running parity of the standard 5-bit cyclic register: y0..y4
// rotate once per bit channel, an information bit is XORed into y0 and a
// PC bit takes the value of y0 (all-zero pc_mask: plain CA-polar).
//
// Origin: u and c = u G_N follow the description; computing the G_N column
// from the bit-subset rule instead of storing G_N, and the one-bit-per-
// cycle schedule, are this design's own choices; the parity-check register
// rule is from TS 38.212.
module polar_encoder_core
  import polar_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [3:0]        n_log,
  input  logic [NMAX-1:0]   info_mask,   // 1 = information position
  input  logic [NMAX-1:0]   pc_mask,     // 1 = parity-check bit position
  input  logic [KMAX-1:0]   bits,        // interleaved CRC-encoded block, bit 0 first
  output logic [NMAX-1:0]   u,
  output logic [NMAX-1:0]   c,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_FILL, S_MUL} state_e;
  state_e state;
  logic [10:0] idx;
  logic [9:0]  kcnt;
  logic [10:0] n_len;
  logic        cbit;
  logic [4:0]  ysr;     // parity-check shift register, ysr[0] = y0
  logic [4:0]  yrot;
  logic        ubit;

  assign n_len = 11'(1) << n_log;

  // y0..y4 rotate by one every bit channel; a PC bit takes y0, an
  // information bit is added into y0
  always_comb begin
    yrot = {ysr[0], ysr[4:1]};
    ubit = pc_mask[idx[9:0]] ? yrot[0] : (info_mask[idx[9:0]] ? bits[kcnt] : 1'b0);
  end

  always_comb begin
    cbit = 1'b0;
    for (int i = 0; i < NMAX; i++)
      if ((10'(i) & idx[9:0]) == idx[9:0]) cbit = cbit ^ u[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      kcnt  <= '0;
      u     <= '0;
      c     <= '0;
      ysr   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          u     <= '0;
          c     <= '0;
          idx   <= '0;
          kcnt  <= '0;
          ysr   <= '0;
          state <= S_FILL;
        end
        S_FILL: begin
          u[idx[9:0]] <= ubit;
          ysr         <= {yrot[4:1], yrot[0] ^ ubit};
          if (info_mask[idx[9:0]]) kcnt <= kcnt + 1'b1;
          if (idx == n_len - 1) begin
            idx   <= '0;
            state <= S_MUL;
          end else idx <= idx + 1'b1;
        end
        S_MUL: begin
          c[idx[9:0]] <= cbit;
          if (idx == n_len - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else idx <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
