// polar_decoder_ip: CRC-aided successive-cancellation list decoder of
// 5G NR polar codes (list size up to 4) behind an AXI4-Lite parameter bus
// and AXI4-Stream data ports.
//
// Software writes PARAM1 K (CRC-encoded block length), PARAM2 E,
// PARAM3 N, PARAM4 L (list size 1..4), PARAM5 crcLen, PARAM6 nMax,
// PARAM7 iIL, loads the information-bit mask (table addresses 0..31, bit b
// of word w = channel 32w+b), the parity-check bit mask (addresses 32..63,
// all zero for CA-polar) and for iIL = 1 the interleaver master table
// (addresses 256+m), then sets ap_start. The IP reads N LLRs from
// in_stream (sign-extended (14,8) values in TDATA[13:0], codeword order),
// decodes them with scl_decoder and writes the K decoded bits, CRC bits
// last, to out_final_stream (one bit per beat in TDATA[0], TLAST on the
// last). The first K-crcLen bits are the message. The error interrupt is
// raised when no list candidate passed the CRC or the parameters are out
// of range (N not a power of two in 32..1024, K > N, L outside 1..4,
// crcLen not 6/11/24, iIL = 1 with K > 164). PARAM2 and PARAM6 are kept for software but not
// needed by the decoder, because N is given directly.
//
// Origin: the ports, parameters and the CA-SCL algorithm follow the IP
// description; stream formats, the table port and the error conditions are
// this design's own choices. Parity-check (PC) polar codes are decoded
// with the TS 38.212 parity rule; their positions come from software.
module polar_decoder_ip
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
  input  logic        in_stream_TVALID,
  output logic        in_stream_TREADY,
  input  logic [31:0] in_stream_TDATA,
  input  logic        in_stream_TLAST,
  output logic        out_final_stream_TVALID,
  input  logic        out_final_stream_TREADY,
  output logic [31:0] out_final_stream_TDATA,
  output logic        out_final_stream_TLAST
);
  typedef enum logic [2:0] {S_IDLE, S_RECV, S_ILP, S_DEC, S_OUT, S_DONE} state_e;
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

  logic [9:0]  k_len, cnt;
  logic [3:0]  n_log, l_size;
  logic [4:0]  crc_len;
  logic        iil;
  logic [10:0] n_len;
  assign n_len = 11'(1) << n_log;

  logic       ilp_start, ilp_done, ilp_seen;
  logic [9:0] pi_k, pi_v;
  il_pattern u_il (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .tbl_we(tbl_we && tbl_addr[15:8] == 8'd1), .tbl_addr(tbl_addr[7:0]),
    .tbl_wdata(tbl_wdata[7:0]),
    .start(ilp_start), .iil(iil), .k(k_len), .done(ilp_done),
    .rd_k(pi_k), .rd_pi(pi_v)
  );

  logic            dec_start, dec_done, dec_crc_ok;
  logic [KMAX-1:0] dec_bits;
  scl_decoder u_dec (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .llr_we(state == S_RECV && in_stream_TVALID), .llr_addr(cnt),
    .llr_wdata(llr_t'(in_stream_TDATA[LLR_W-1:0])),
    .start(dec_start), .n_log(n_log), .k_len(k_len), .crc_len(crc_len),
    .list_size(l_size), .info_mask(info_mask), .pc_mask(pc_mask),
    .pi_rd_k(pi_k), .pi_rd_pi(pi_v),
    .done(dec_done), .crc_ok(dec_crc_ok), .out_bits(dec_bits)
  );

  logic param_ok;
  logic [31:0] p_n;
  always_comb begin
    p_n = param[3];
    param_ok = (p_n >= 32) && (p_n <= NMAX) && ((p_n & (p_n - 1)) == 0) &&
               (param[1] != 0) && (param[1] <= p_n) && (param[1] <= KMAX) &&
               (param[4] >= 1) && (param[4] <= LMAX) &&
               (param[5] == 6 || param[5] == 11 || param[5] == 24) &&
               !(param[7][0] && param[1] > IL_MAX);
  end

  assign start_ack               = (state == S_IDLE) && ap_start;
  assign in_stream_TREADY        = (state == S_RECV);
  assign out_final_stream_TVALID = (state == S_OUT);
  assign out_final_stream_TDATA  = {31'd0, dec_bits[cnt]};
  assign out_final_stream_TLAST  = (state == S_OUT) && (cnt == k_len - 1);

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state     <= S_IDLE;
      k_len     <= '0;
      cnt       <= '0;
      n_log     <= 4'd5;
      l_size    <= 4'd1;
      crc_len   <= 5'd24;
      iil       <= 1'b0;
      ilp_start <= 1'b0;
      ilp_seen  <= 1'b0;
      dec_start <= 1'b0;
      done_set  <= 1'b0;
      err_set   <= 1'b0;
    end else begin
      ilp_start <= 1'b0;
      dec_start <= 1'b0;
      done_set  <= 1'b0;
      err_set   <= 1'b0;
      if (ilp_done) ilp_seen <= 1'b1;
      case (state)
        S_IDLE: if (ap_start) begin
          k_len    <= param[1][9:0];
          n_log    <= 4'(clog2u(param[3]));
          l_size   <= param[4][3:0];
          crc_len  <= param[5][4:0];
          iil      <= param[7][0];
          cnt      <= '0;
          ilp_seen <= 1'b0;
          if (param_ok) begin
            ilp_start <= 1'b1;
            state     <= S_RECV;
          end else begin
            err_set <= 1'b1;
            state   <= S_DONE;
          end
        end
        S_RECV: if (in_stream_TVALID) begin
          cnt <= cnt + 1'b1;
          if (11'(cnt) == n_len - 1) state <= S_ILP;
        end
        S_ILP: if (ilp_seen || ilp_done) begin
          dec_start <= 1'b1;
          state     <= S_DEC;
        end
        S_DEC: if (dec_done) begin
          cnt   <= '0;
          if (!dec_crc_ok) err_set <= 1'b1;
          state <= S_OUT;
        end
        S_OUT: if (out_final_stream_TREADY) begin
          if (cnt == k_len - 1) state <= S_DONE;
          else cnt <= cnt + 1'b1;
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
  assign unused_ok = in_stream_TLAST ^ (^param[2]) ^ (^param[6]);
endmodule
