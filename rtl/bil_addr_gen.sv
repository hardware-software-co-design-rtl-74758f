// bil_addr_gen: address sequence of the uplink triangular bit interleaver
// (TS 38.212 5.4.1.3), shared by the rate matcher and the rate recover.
//
// The interleaver writes the E rate-matched bits row by row into an
// isosceles triangle of side T (T the smallest integer with
// T(T+1)/2 >= E) and reads it column by column, skipping the unused cells.
// This unit produces, for output index k = 0..E-1, the row-major input
// position pos(k), so that f(k) = e(pos(k)). After start it first searches
// T (at most 128 cycles), then presents one address per accepted "next";
// cycles that land on an unused cell are skipped internally (valid low).
// With bypass = 1 (no bit interleaving) pos(k) = k.
// last is high together with the final valid address.
//
// Origin: the triangular interleaver is the standard one (the description
// only says the bits are stored one way and read the other); the search
// for T and the skip logic are this design's own.
module bil_addr_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        bypass,
  input  logic [13:0] e_len,
  input  logic        next,
  output logic        valid,
  output logic [13:0] pos,
  output logic        last
);
  typedef enum logic [1:0] {S_IDLE, S_FIND_T, S_RUN} state_e;
  state_e state;
  logic [7:0]  t, i, j;
  logic [14:0] tri_sz;
  logic [15:0] p;          // row-major position of cell (i, j)
  logic [13:0] kcnt;
  logic        byp;

  assign valid = (state == S_RUN) && (byp || p < 16'(e_len));
  assign pos   = byp ? kcnt : p[13:0];
  assign last  = valid && (kcnt == e_len - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      t      <= '0;
      i      <= '0;
      j      <= '0;
      p      <= '0;
      kcnt   <= '0;
      tri_sz <= '0;
      byp    <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          byp    <= bypass;
          kcnt   <= '0;
          t      <= 8'd1;
          tri_sz <= 15'd1;
          i      <= '0;
          j      <= '0;
          p      <= '0;
          state  <= bypass ? S_RUN : S_FIND_T;
        end
        S_FIND_T: begin
          if (tri_sz >= 15'(e_len)) state <= S_RUN;
          else begin
            t      <= t + 1'b1;
            tri_sz <= tri_sz + 15'(t) + 15'd1;
          end
        end
        S_RUN: begin
          if (!valid || next) begin
            if (valid) kcnt <= kcnt + 1'b1;
            if (last) state <= S_IDLE;
            else if (!byp) begin
              if (16'(i) + 16'(j) + 1 < 16'(t)) begin
                p <= p + 16'(t) - 16'(i);
                i <= i + 1'b1;
              end else begin
                j <= j + 1'b1;
                i <= '0;
                p <= 16'(j) + 16'd1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
