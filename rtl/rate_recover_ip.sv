// rate_recover_ip: receiver front end of 5G NR polar coding - soft
// demodulation and rate recovery - behind an AXI4-Lite parameter bus and
// AXI4-Stream data ports.
//
// Software writes PARAM1 K, PARAM2 E, PARAM3 N (code length, a power of
// two from 32 to 1024), PARAM4 iBIL and PARAM5 mod_scheme, then sets
// ap_start. The IP reads 2*ceil(E/bps) words from rSig_stream (I then Q
// of each received symbol, sign-extended (14,8) fixed point in
// TDATA[13:0]), demodulates every symbol into bps LLRs (one LLR per cycle
// into the recovery buffer) and then writes the N recovered LLRs to
// out_stream in codeword order, sign-extended, TLAST on the last one.
// Unsupported parameters (N not a power of two in 32..1024, E > 8192,
// E = 0) raise the error interrupt and end the job.
//
// Origin: ports and parameter fields follow the IP description; the output
// is N LLRs (what the decoder needs); stream formats and error conditions
// are this design's own choices.
module rate_recover_ip
  import polar_pkg::*;
(
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  output logic        interrupt,
  input  logic [6:0]  s_axi_CONTROL_BUS_AWADDR,
  input  logic        s_axi_CONTROL_BUS_AWVALID,
  output logic        s_axi_CONTROL_BUS_AWREADY,
  input  logic [31:0] s_axi_CONTROL_BUS_WDATA,
  input  logic [3:0]  s_axi_CONTROL_BUS_WSTRB,
  input  logic        s_axi_CONTROL_BUS_WVALID,
  output logic        s_axi_CONTROL_BUS_WREADY,
  output logic [1:0]  s_axi_CONTROL_BUS_BRESP,
  output logic        s_axi_CONTROL_BUS_BVALID,
  input  logic        s_axi_CONTROL_BUS_BREADY,
  input  logic [6:0]  s_axi_CONTROL_BUS_ARADDR,
  input  logic        s_axi_CONTROL_BUS_ARVALID,
  output logic        s_axi_CONTROL_BUS_ARREADY,
  output logic [31:0] s_axi_CONTROL_BUS_RDATA,
  output logic [1:0]  s_axi_CONTROL_BUS_RRESP,
  output logic        s_axi_CONTROL_BUS_RVALID,
  input  logic        s_axi_CONTROL_BUS_RREADY,
  input  logic        rSig_stream_TVALID,
  output logic        rSig_stream_TREADY,
  input  logic [31:0] rSig_stream_TDATA,
  input  logic        rSig_stream_TLAST,
  output logic        out_stream_TVALID,
  input  logic        out_stream_TREADY,
  output logic [31:0] out_stream_TDATA,
  output logic        out_stream_TLAST
);
  typedef enum logic [2:0] {S_IDLE, S_RX_I, S_RX_Q, S_DEMOD, S_OUT, S_DONE} state_e;
  state_e state;

  logic [31:0] param [16];
  logic        ap_start, start_ack, done_set, err_set;
  logic        tbl_we;
  logic [15:0] tbl_addr;
  logic [31:0] tbl_wdata;

  axil_regs u_regs (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .awaddr(s_axi_CONTROL_BUS_AWADDR), .awvalid(s_axi_CONTROL_BUS_AWVALID),
    .awready(s_axi_CONTROL_BUS_AWREADY), .wdata(s_axi_CONTROL_BUS_WDATA),
    .wstrb(s_axi_CONTROL_BUS_WSTRB), .wvalid(s_axi_CONTROL_BUS_WVALID),
    .wready(s_axi_CONTROL_BUS_WREADY), .bresp(s_axi_CONTROL_BUS_BRESP),
    .bvalid(s_axi_CONTROL_BUS_BVALID), .bready(s_axi_CONTROL_BUS_BREADY),
    .araddr(s_axi_CONTROL_BUS_ARADDR), .arvalid(s_axi_CONTROL_BUS_ARVALID),
    .arready(s_axi_CONTROL_BUS_ARREADY), .rdata(s_axi_CONTROL_BUS_RDATA),
    .rresp(s_axi_CONTROL_BUS_RRESP), .rvalid(s_axi_CONTROL_BUS_RVALID),
    .rready(s_axi_CONTROL_BUS_RREADY),
    .param(param), .ap_start(ap_start), .ap_start_ack(start_ack),
    .ap_done_set(done_set), .ap_idle(state == S_IDLE), .err_set(err_set),
    .tbl_we(tbl_we), .tbl_addr(tbl_addr), .tbl_wdata(tbl_wdata),
    .interrupt(interrupt)
  );

  logic [9:0]  k_len;
  logic [13:0] e_len, ecnt;
  logic [3:0]  n_log;
  logic        ibil;
  mod_e        mods;
  logic [2:0]  bps, bcnt;
  llr_t        rx_i, rx_q;
  llr_t        dem [6];
  logic        rr_start, rr_in_ready, rr_out_valid, rr_out_last;
  llr_t        rr_out;

  soft_demodulator u_dem (.mod_scheme(mods), .sym_i(rx_i), .sym_q(rx_q), .llr(dem));

  rate_recover u_rr (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(rr_start), .n_log(n_log),
    .e_len(e_len), .k_len(k_len), .ibil(ibil),
    .in_valid(state == S_DEMOD), .in_llr(dem[bcnt]), .in_ready(rr_in_ready),
    .out_valid(rr_out_valid), .out_llr(rr_out), .out_last(rr_out_last),
    .out_ready(out_stream_TREADY && state == S_OUT)
  );

  logic param_ok;
  logic [31:0] p_n;
  always_comb begin
    p_n = param[3];
    param_ok = (p_n >= 32) && (p_n <= NMAX) && ((p_n & (p_n - 1)) == 0) &&
               (param[2] != 0) && (param[2] <= EMAX);
  end

  assign start_ack          = (state == S_IDLE) && ap_start;
  assign rSig_stream_TREADY = (state == S_RX_I) || (state == S_RX_Q);
  assign out_stream_TVALID  = (state == S_OUT) && rr_out_valid;
  assign out_stream_TDATA   = 32'(signed'(rr_out));
  assign out_stream_TLAST   = rr_out_last;

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state    <= S_IDLE;
      k_len    <= '0;
      e_len    <= '0;
      ecnt     <= '0;
      n_log    <= 4'd5;
      ibil     <= 1'b0;
      mods     <= MOD_QPSK;
      bps      <= 3'd2;
      bcnt     <= '0;
      rx_i     <= '0;
      rx_q     <= '0;
      rr_start <= 1'b0;
      done_set <= 1'b0;
      err_set  <= 1'b0;
    end else begin
      rr_start <= 1'b0;
      done_set <= 1'b0;
      err_set  <= 1'b0;
      case (state)
        S_IDLE: if (ap_start) begin
          k_len <= param[1][9:0];
          e_len <= param[2][13:0];
          n_log <= 4'(clog2u(param[3]));
          ibil  <= param[4][0];
          mods  <= mod_e'(param[5][1:0]);
          bps   <= 3'(bits_per_symbol(mod_e'(param[5][1:0])));
          ecnt  <= '0;
          if (param_ok) begin
            rr_start <= 1'b1;
            state    <= S_RX_I;
          end else begin
            err_set <= 1'b1;
            state   <= S_DONE;
          end
        end
        S_RX_I: if (rSig_stream_TVALID) begin
          rx_i  <= llr_t'(rSig_stream_TDATA[LLR_W-1:0]);
          state <= S_RX_Q;
        end
        S_RX_Q: if (rSig_stream_TVALID) begin
          rx_q  <= llr_t'(rSig_stream_TDATA[LLR_W-1:0]);
          bcnt  <= '0;
          state <= S_DEMOD;
        end
        S_DEMOD: if (rr_in_ready) begin
          ecnt <= ecnt + 1'b1;
          if (ecnt == e_len - 1) state <= S_OUT;
          else if (bcnt == bps - 1) state <= S_RX_I;
          else bcnt <= bcnt + 1'b1;
        end
        S_OUT: if (out_stream_TREADY && rr_out_valid && rr_out_last) state <= S_DONE;
        S_DONE: begin
          done_set <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused_ok;
  assign unused_ok = rSig_stream_TLAST ^ tbl_we ^ (^tbl_addr) ^ (^tbl_wdata);
endmodule
