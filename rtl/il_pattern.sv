// il_pattern: input-bit interleaver pattern for polar coding (used when
// iIL = 1, the downlink case).
//
// Software loads the 164-entry master pattern PI_max over the table port
// (one entry per write, address = entry index). On start the unit derives
// the pattern for the current block length K with the TS 38.212 rule:
// walk PI_max in order, keep every entry >= 164-K and subtract 164-K from
// it. This takes 164 cycles, then done pulses. pi_idx(k) is afterwards
// read combinationally: the interleaved block takes bit c'(k) = c(pi(k)).
// With iIL = 0 the pattern is the identity, for any K up to 1023, and
// start finishes after one cycle.
//
// Origin: the function is the described input interleaver; the master
// table is not built in (it is loaded), and the serial derivation is this
// design's own.
module il_pattern
  import polar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // master table load
  input  logic        tbl_we,
  input  logic [7:0]  tbl_addr,
  input  logic [7:0]  tbl_wdata,
  // derive pattern for K
  input  logic        start,
  input  logic        iil,
  input  logic [9:0]  k,
  output logic        done,
  // lookup
  input  logic [9:0]  rd_k,
  output logic [9:0]  rd_pi
);
  logic [7:0] pi_max [IL_MAX];
  logic [7:0] pi_k   [IL_MAX];
  logic       busy, use_il;
  logic [7:0] m, wr;
  logic [7:0] offs;

  always_ff @(posedge clk) begin
    if (tbl_we && tbl_addr < 8'(IL_MAX)) pi_max[tbl_addr] <= tbl_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      use_il <= 1'b0;
      m      <= '0;
      wr     <= '0;
      offs   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        use_il <= iil;
        m      <= '0;
        wr     <= '0;
        offs   <= (k >= 10'(IL_MAX)) ? 8'd0 : 8'(10'(IL_MAX) - k);
        if (iil) busy <= 1'b1;
        else     done <= 1'b1;
      end else if (busy) begin
        if (pi_max[m] >= offs) begin
          pi_k[wr] <= pi_max[m] - offs;
          wr       <= wr + 1'b1;
        end
        m <= m + 1'b1;
        if (m == 8'(IL_MAX - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    if (use_il && rd_k < 10'(IL_MAX)) rd_pi = 10'(pi_k[rd_k[7:0]]);
    else                             rd_pi = rd_k;
  end
endmodule
