// crc_unit: serial CRC long division for 5G NR polar coding (crcLen 6, 11
// or 24).
//
// On start the unit loads gPoly for the requested crcLen (state C0: the
// three polynomials are held as constants and a comparator on crcLen picks
// one). It then divides the block bit by bit: C1 shifts the next dividend
// bit into divBlk, C2 tests the leading bit of divBlk, C3 either XORs
// divBlk with gPoly or copies it unchanged into remBits. C1-C2-C3 repeat
// once per dividend bit, so a division of NB bits takes 3*NB+2 cycles.
//
// The dividend is presented as a vector, bit 0 first (highest power).
// To compute CRC bits, present the message followed by crcLen zero bits;
// to check a block, present the whole CRC-encoded block: the remainder is
// then zero exactly when the CRC holds. rem holds the crcLen remainder
// bits right-aligned (rem[crcLen-1] is the first CRC bit). done pulses for
// one cycle; rem stays valid until the next start.
//
// Origin: the gPoly selection and the C0..C3 division steps follow the
// described CRC architecture; the polynomials are the TS 38.212 ones and
// the cycle split is this design's own.
module crc_unit
  import polar_pkg::*;
#(
  parameter int unsigned MAXBITS = KMAX + CRC_MAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [4:0]                  crc_len,
  input  logic [MAXBITS-1:0]          blk,
  input  logic [$clog2(MAXBITS+1)-1:0] nbits,
  output logic                        busy,
  output logic                        done,
  output logic [CRC_MAX-1:0]          rem
);
  typedef enum logic [2:0] {S_IDLE, S_C0, S_C1, S_C2, S_C3} state_e;
  state_e state;

  logic [CRC_MAX:0]   gpoly;
  logic [CRC_MAX:0]   div_blk;
  logic [CRC_MAX-1:0] rem_bits;
  logic [4:0]         len;
  logic [$clog2(MAXBITS+1)-1:0] idx;

  assign busy = (state != S_IDLE);
  assign rem  = rem_bits;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      gpoly    <= '0;
      div_blk  <= '0;
      rem_bits <= '0;
      len      <= 5'd24;
      idx      <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          len   <= crc_len;
          state <= S_C0;
        end
        S_C0: begin
          gpoly    <= crc_poly(len);
          rem_bits <= '0;
          idx      <= '0;
          state    <= (nbits == 0) ? S_IDLE : S_C1;
          done     <= (nbits == 0);
        end
        S_C1: begin
          // dividend window = remainder bits followed by next block bit
          div_blk <= '0;
          for (int i = 0; i < CRC_MAX; i++)
            if (i < 32'(len)) div_blk[i+1] <= rem_bits[i];
          div_blk[0] <= blk[idx];
          idx        <= idx + 1'b1;
          state      <= S_C2;
        end
        S_C2: state <= S_C3;
        S_C3: begin
          for (int i = 0; i < CRC_MAX; i++)
            if (div_blk[len]) rem_bits[i] <= (i < 32'(len)) ? (div_blk[i] ^ gpoly[i]) : 1'b0;
            else              rem_bits[i] <= (i < 32'(len)) ? div_blk[i] : 1'b0;
          if (idx == nbits) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_C1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
