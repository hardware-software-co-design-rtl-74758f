// polar_encoder_ip: transmitter chain of 5G NR polar coding - CRC
// attachment, input interleaving, polar encoding, rate matching and
// modulation - behind an AXI4-Lite parameter bus and AXI4-Stream data ports.
//
// Operation: software writes the parameters (AXI4-Lite, see axil_regs),
// loads the information-bit mask and, for iIL = 1, the interleaver master
// table, then sets ap_start. The IP takes msgLen message bits from
// msg_Instream (one bit per beat, TDATA[0]), computes K = msgLen + crcLen
// and the code length N from K, E and nMax, and produces ceil(E/bps)
// symbols on symbMod_Outstream as two beats each, I then Q, every one a
// sign-extended (14,8) fixed-point value; TLAST marks the last Q beat.
// ap_done is raised at the end; a parameter set outside the supported
// range (K > 1023, E > 8192, E < K, crcLen not 6/11/24, iIL = 1 with
// K > 164, the interleaver's length) raises the error
// interrupt and ends the job without consuming data.
// Parameter registers: PARAM1 msgLen, PARAM2 E, PARAM3 crcLen, PARAM4 nMax,
// PARAM5 iIL, PARAM6 iBIL, PARAM7 mod_scheme.
// Table writes: address 0..31 = information mask word (bit b of word w is
// channel 32w+b, 1 = information); address 32..63 = parity-check (PC) bit
// mask, same layout (all zero for CA-polar); address 256+m = interleaver
// entry m.
//
// Origin: ports and parameter fields follow the IP description; stream
// formats, the table port, N selection from TS 38.212 and the error
// conditions are this design's own choices. Parity-check (PC) bits follow
// TS 38.212; their positions come from software like the frozen mask.
module polar_encoder_ip
  import polar_pkg::*;
(
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  output logic        interrupt,
  // AXI4-Lite control bus
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
  // message input stream
  input  logic        msg_Instream_TVALID,
  output logic        msg_Instream_TREADY,
  input  logic [31:0] msg_Instream_TDATA,
  input  logic        msg_Instream_TLAST,
  // modulated symbol output stream
  output logic        symbMod_Outstream_TVALID,
  input  logic        symbMod_Outstream_TREADY,
  output logic [31:0] symbMod_Outstream_TDATA,
  output logic        symbMod_Outstream_TLAST
);
  typedef enum logic [3:0] {
    S_IDLE, S_RECV, S_CRC, S_ILP, S_ILV, S_ENC, S_GATHER, S_OUT_I, S_OUT_Q, S_DONE
  } state_e;
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

  // latched job parameters
  logic [9:0]  a_len, k_len;
  logic [13:0] e_len;
  logic [4:0]  crc_len;
  logic [3:0]  n_log;
  logic        iil, ibil;
  mod_e        mods;
  logic [2:0]  bps;

  // information mask, loaded by software
  logic [NMAX-1:0] info_mask;
  logic [NMAX-1:0] pc_mask;
  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      info_mask <= '0;
      pc_mask   <= '0;
    end else if (tbl_we && tbl_addr[15:5] == 11'd0) begin
      info_mask[32*tbl_addr[4:0] +: 32] <= tbl_wdata;
    end else if (tbl_we && tbl_addr[15:5] == 11'd1) begin
      pc_mask[32*tbl_addr[4:0] +: 32] <= tbl_wdata;
    end
  end

  // block buffers
  logic [KMAX+CRC_MAX-1:0] blk;       // message then CRC bits
  logic [KMAX-1:0]         blk_int;   // interleaved block
  logic [9:0]              cnt;

  // CRC
  logic              crc_start, crc_done, crc_busy;
  logic [CRC_MAX-1:0] crc_rem;
  crc_unit u_crc (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(crc_start), .crc_len(crc_len),
    .blk(blk), .nbits(11'(a_len) + 11'(crc_len)), .busy(crc_busy),
    .done(crc_done), .rem(crc_rem)
  );

  // interleaver
  logic       ilp_start, ilp_done;
  logic [9:0] pi_k;
  il_pattern u_il (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .tbl_we(tbl_we && tbl_addr[15:8] == 8'd1), .tbl_addr(tbl_addr[7:0]),
    .tbl_wdata(tbl_wdata[7:0]),
    .start(ilp_start), .iil(iil), .k(k_len), .done(ilp_done),
    .rd_k(cnt), .rd_pi(pi_k)
  );

  // encoder
  logic            enc_start, enc_done;
  logic [NMAX-1:0] enc_u, enc_c;
  polar_encoder_core u_enc (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(enc_start), .n_log(n_log),
    .info_mask(info_mask), .pc_mask(pc_mask), .bits(blk_int), .u(enc_u), .c(enc_c),
    .done(enc_done)
  );

  // rate matching
  logic rm_start, rm_valid, rm_bit, rm_last, rm_ready;
  rate_matcher u_rm (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(rm_start), .cw(enc_c),
    .n_log(n_log), .e_len(e_len), .k_len(k_len), .ibil(ibil),
    .out_valid(rm_valid), .out_bit(rm_bit), .out_last(rm_last),
    .out_ready(rm_ready)
  );

  // modulation
  logic [5:0] sym_bits;
  logic [2:0] sym_cnt;
  logic       sym_last;
  llr_t       mod_i, mod_q;
  modulator u_mod (.mod_scheme(mods), .bits(sym_bits), .sym_i(mod_i), .sym_q(mod_q));

  logic param_ok;
  always_comb begin
    logic [31:0] k_req;
    k_req = param[1] + param[3];
    param_ok = (param[1] != 0) && (k_req <= KMAX) && (param[2] <= EMAX) &&
               (param[2] >= k_req) &&
               (param[3] == 6 || param[3] == 11 || param[3] == 24) &&
               (param[4] >= 5) && (param[4] <= NMAX_LOG) &&
               !(param[5][0] && k_req > IL_MAX);
  end

  assign start_ack = (state == S_IDLE) && ap_start;
  assign crc_start = (state == S_RECV) && msg_Instream_TVALID && (cnt == a_len - 1);
  assign rm_ready  = (state == S_GATHER);
  assign msg_Instream_TREADY = (state == S_RECV);

  assign symbMod_Outstream_TVALID = (state == S_OUT_I) || (state == S_OUT_Q);
  assign symbMod_Outstream_TDATA  = (state == S_OUT_Q) ? 32'(signed'(mod_q)) : 32'(signed'(mod_i));
  assign symbMod_Outstream_TLAST  = (state == S_OUT_Q) && sym_last;

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state     <= S_IDLE;
      a_len     <= '0;
      k_len     <= '0;
      e_len     <= '0;
      crc_len   <= 5'd24;
      n_log     <= 4'd5;
      iil       <= 1'b0;
      ibil      <= 1'b0;
      mods      <= MOD_QPSK;
      bps       <= 3'd2;
      blk       <= '0;
      blk_int   <= '0;
      cnt       <= '0;
      ilp_start <= 1'b0;
      enc_start <= 1'b0;
      rm_start  <= 1'b0;
      sym_bits  <= '0;
      sym_cnt   <= '0;
      sym_last  <= 1'b0;
      done_set  <= 1'b0;
      err_set   <= 1'b0;
    end else begin
      ilp_start <= 1'b0;
      enc_start <= 1'b0;
      rm_start  <= 1'b0;
      done_set  <= 1'b0;
      err_set   <= 1'b0;
      case (state)
        S_IDLE: if (ap_start) begin
          a_len   <= param[1][9:0];
          k_len   <= 10'(param[1] + param[3]);
          e_len   <= param[2][13:0];
          crc_len <= param[3][4:0];
          n_log   <= polar_n(param[1] + param[3], param[2], param[4]);
          iil     <= param[5][0];
          ibil    <= param[6][0];
          mods    <= mod_e'(param[7][1:0]);
          bps     <= 3'(bits_per_symbol(mod_e'(param[7][1:0])));
          blk     <= '0;
          cnt     <= '0;
          if (param_ok) state <= S_RECV;
          else begin
            err_set <= 1'b1;
            state   <= S_DONE;
          end
        end
        S_RECV: if (msg_Instream_TVALID) begin
          blk[11'(cnt)] <= msg_Instream_TDATA[0];
          cnt      <= cnt + 1'b1;
          if (cnt == a_len - 1) state <= S_CRC;
        end
        S_CRC: if (crc_done) begin
          for (int i = 0; i < CRC_MAX; i++)
            if (i < 32'(crc_len)) blk[32'(a_len) + i] <= crc_rem[32'(crc_len) - 1 - i];
          ilp_start <= 1'b1;
          state     <= S_ILP;
        end
        S_ILP: if (ilp_done) begin
          cnt   <= '0;
          state <= S_ILV;
        end
        S_ILV: begin
          blk_int[cnt] <= blk[11'(pi_k)];
          if (cnt == k_len - 1) begin
            enc_start <= 1'b1;
            state     <= S_ENC;
          end else cnt <= cnt + 1'b1;
        end
        S_ENC: if (enc_done) begin
          rm_start <= 1'b1;
          sym_cnt  <= '0;
          sym_bits <= '0;
          state    <= S_GATHER;
        end
        S_GATHER: if (rm_valid) begin
          sym_bits[sym_cnt] <= rm_bit;
          if (sym_cnt == bps - 1 || rm_last) begin
            sym_cnt  <= '0;
            sym_last <= rm_last;
            state    <= S_OUT_I;
          end else sym_cnt <= sym_cnt + 1'b1;
        end
        S_OUT_I: if (symbMod_Outstream_TREADY) state <= S_OUT_Q;
        S_OUT_Q: if (symbMod_Outstream_TREADY) begin
          sym_bits <= '0;
          state    <= sym_last ? S_DONE : S_GATHER;
        end
        S_DONE: begin
          done_set <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused_ok;
  assign unused_ok = msg_Instream_TLAST ^ crc_busy ^ (^enc_u);
endmodule
