// polar_soc_top: programmable-logic part of the 5G NR polar coding
// system-on-chip - polar encoder IP, rate-recover IP and polar decoder IP.
//
// The three IPs each have their own AXI4-Lite control bus and interrupt,
// brought out as ports for the processor's general-purpose port. Message
// bits enter the encoder and modulated symbols leave it as AXI4-Streams
// towards the DMA; the channel (noise added by software on the processor)
// is outside this block, so its received symbols enter the rate-recover IP
// through another stream. The rate-recover IP feeds the decoder directly
// over an internal AXI4-Stream (N LLRs per block), and the decoded bits
// leave on dec_out. Stream words and timing are those of the IPs.
//
// Origin: the three IPs and the rate-recover to decoder stream follow the
// described SoC architecture; the processor, memory, DMA and the software
// channel are outside and reach the IPs through these ports.
module polar_soc_top (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control bus of the enc IP
  output logic        enc_interrupt,
  input  logic [6:0]  enc_axi_AWADDR,
  input  logic        enc_axi_AWVALID,
  output logic        enc_axi_AWREADY,
  input  logic [31:0] enc_axi_WDATA,
  input  logic [3:0]  enc_axi_WSTRB,
  input  logic        enc_axi_WVALID,
  output logic        enc_axi_WREADY,
  output logic [1:0]  enc_axi_BRESP,
  output logic        enc_axi_BVALID,
  input  logic        enc_axi_BREADY,
  input  logic [6:0]  enc_axi_ARADDR,
  input  logic        enc_axi_ARVALID,
  output logic        enc_axi_ARREADY,
  output logic [31:0] enc_axi_RDATA,
  output logic [1:0]  enc_axi_RRESP,
  output logic        enc_axi_RVALID,
  input  logic        enc_axi_RREADY,
  // AXI4-Lite control bus of the rr IP
  output logic        rr_interrupt,
  input  logic [6:0]  rr_axi_AWADDR,
  input  logic        rr_axi_AWVALID,
  output logic        rr_axi_AWREADY,
  input  logic [31:0] rr_axi_WDATA,
  input  logic [3:0]  rr_axi_WSTRB,
  input  logic        rr_axi_WVALID,
  output logic        rr_axi_WREADY,
  output logic [1:0]  rr_axi_BRESP,
  output logic        rr_axi_BVALID,
  input  logic        rr_axi_BREADY,
  input  logic [6:0]  rr_axi_ARADDR,
  input  logic        rr_axi_ARVALID,
  output logic        rr_axi_ARREADY,
  output logic [31:0] rr_axi_RDATA,
  output logic [1:0]  rr_axi_RRESP,
  output logic        rr_axi_RVALID,
  input  logic        rr_axi_RREADY,
  // AXI4-Lite control bus of the dec IP
  output logic        dec_interrupt,
  input  logic [6:0]  dec_axi_AWADDR,
  input  logic        dec_axi_AWVALID,
  output logic        dec_axi_AWREADY,
  input  logic [31:0] dec_axi_WDATA,
  input  logic [3:0]  dec_axi_WSTRB,
  input  logic        dec_axi_WVALID,
  output logic        dec_axi_WREADY,
  output logic [1:0]  dec_axi_BRESP,
  output logic        dec_axi_BVALID,
  input  logic        dec_axi_BREADY,
  input  logic [6:0]  dec_axi_ARADDR,
  input  logic        dec_axi_ARVALID,
  output logic        dec_axi_ARREADY,
  output logic [31:0] dec_axi_RDATA,
  output logic [1:0]  dec_axi_RRESP,
  output logic        dec_axi_RVALID,
  input  logic        dec_axi_RREADY,
  // message bits from memory (DMA MM2S)
  input  logic        msg_in_TVALID,
  output logic        msg_in_TREADY,
  input  logic [31:0] msg_in_TDATA,
  input  logic        msg_in_TLAST,
  // modulated symbols to the channel (DMA S2MM)
  output logic        symb_out_TVALID,
  input  logic        symb_out_TREADY,
  output logic [31:0] symb_out_TDATA,
  output logic        symb_out_TLAST,
  // received symbols from the channel (DMA MM2S)
  input  logic        rsig_in_TVALID,
  output logic        rsig_in_TREADY,
  input  logic [31:0] rsig_in_TDATA,
  input  logic        rsig_in_TLAST,
  // decoded bits to memory (DMA S2MM)
  output logic        dec_out_TVALID,
  input  logic        dec_out_TREADY,
  output logic [31:0] dec_out_TDATA,
  output logic        dec_out_TLAST
);

  logic        llr_TVALID, llr_TREADY, llr_TLAST;
  logic [31:0] llr_TDATA;

  polar_encoder_ip u_enc (
    .ap_clk(clk),
    .ap_rst_n(rst_n),
    .interrupt(enc_interrupt),
    .s_axi_CONTROL_BUS_AWADDR(enc_axi_AWADDR),
    .s_axi_CONTROL_BUS_AWVALID(enc_axi_AWVALID),
    .s_axi_CONTROL_BUS_AWREADY(enc_axi_AWREADY),
    .s_axi_CONTROL_BUS_WDATA(enc_axi_WDATA),
    .s_axi_CONTROL_BUS_WSTRB(enc_axi_WSTRB),
    .s_axi_CONTROL_BUS_WVALID(enc_axi_WVALID),
    .s_axi_CONTROL_BUS_WREADY(enc_axi_WREADY),
    .s_axi_CONTROL_BUS_BRESP(enc_axi_BRESP),
    .s_axi_CONTROL_BUS_BVALID(enc_axi_BVALID),
    .s_axi_CONTROL_BUS_BREADY(enc_axi_BREADY),
    .s_axi_CONTROL_BUS_ARADDR(enc_axi_ARADDR),
    .s_axi_CONTROL_BUS_ARVALID(enc_axi_ARVALID),
    .s_axi_CONTROL_BUS_ARREADY(enc_axi_ARREADY),
    .s_axi_CONTROL_BUS_RDATA(enc_axi_RDATA),
    .s_axi_CONTROL_BUS_RRESP(enc_axi_RRESP),
    .s_axi_CONTROL_BUS_RVALID(enc_axi_RVALID),
    .s_axi_CONTROL_BUS_RREADY(enc_axi_RREADY),
    .msg_Instream_TVALID(msg_in_TVALID),
    .msg_Instream_TREADY(msg_in_TREADY),
    .msg_Instream_TDATA(msg_in_TDATA),
    .msg_Instream_TLAST(msg_in_TLAST),
    .symbMod_Outstream_TVALID(symb_out_TVALID),
    .symbMod_Outstream_TREADY(symb_out_TREADY),
    .symbMod_Outstream_TDATA(symb_out_TDATA),
    .symbMod_Outstream_TLAST(symb_out_TLAST)
  );

  rate_recover_ip u_rr (
    .ap_clk(clk),
    .ap_rst_n(rst_n),
    .interrupt(rr_interrupt),
    .s_axi_CONTROL_BUS_AWADDR(rr_axi_AWADDR),
    .s_axi_CONTROL_BUS_AWVALID(rr_axi_AWVALID),
    .s_axi_CONTROL_BUS_AWREADY(rr_axi_AWREADY),
    .s_axi_CONTROL_BUS_WDATA(rr_axi_WDATA),
    .s_axi_CONTROL_BUS_WSTRB(rr_axi_WSTRB),
    .s_axi_CONTROL_BUS_WVALID(rr_axi_WVALID),
    .s_axi_CONTROL_BUS_WREADY(rr_axi_WREADY),
    .s_axi_CONTROL_BUS_BRESP(rr_axi_BRESP),
    .s_axi_CONTROL_BUS_BVALID(rr_axi_BVALID),
    .s_axi_CONTROL_BUS_BREADY(rr_axi_BREADY),
    .s_axi_CONTROL_BUS_ARADDR(rr_axi_ARADDR),
    .s_axi_CONTROL_BUS_ARVALID(rr_axi_ARVALID),
    .s_axi_CONTROL_BUS_ARREADY(rr_axi_ARREADY),
    .s_axi_CONTROL_BUS_RDATA(rr_axi_RDATA),
    .s_axi_CONTROL_BUS_RRESP(rr_axi_RRESP),
    .s_axi_CONTROL_BUS_RVALID(rr_axi_RVALID),
    .s_axi_CONTROL_BUS_RREADY(rr_axi_RREADY),
    .rSig_stream_TVALID(rsig_in_TVALID),
    .rSig_stream_TREADY(rsig_in_TREADY),
    .rSig_stream_TDATA(rsig_in_TDATA),
    .rSig_stream_TLAST(rsig_in_TLAST),
    .out_stream_TVALID(llr_TVALID),
    .out_stream_TREADY(llr_TREADY),
    .out_stream_TDATA(llr_TDATA),
    .out_stream_TLAST(llr_TLAST)
  );

  polar_decoder_ip u_dec (
    .ap_clk(clk),
    .ap_rst_n(rst_n),
    .interrupt(dec_interrupt),
    .s_axi_CONTROL_BUS_AWADDR(dec_axi_AWADDR),
    .s_axi_CONTROL_BUS_AWVALID(dec_axi_AWVALID),
    .s_axi_CONTROL_BUS_AWREADY(dec_axi_AWREADY),
    .s_axi_CONTROL_BUS_WDATA(dec_axi_WDATA),
    .s_axi_CONTROL_BUS_WSTRB(dec_axi_WSTRB),
    .s_axi_CONTROL_BUS_WVALID(dec_axi_WVALID),
    .s_axi_CONTROL_BUS_WREADY(dec_axi_WREADY),
    .s_axi_CONTROL_BUS_BRESP(dec_axi_BRESP),
    .s_axi_CONTROL_BUS_BVALID(dec_axi_BVALID),
    .s_axi_CONTROL_BUS_BREADY(dec_axi_BREADY),
    .s_axi_CONTROL_BUS_ARADDR(dec_axi_ARADDR),
    .s_axi_CONTROL_BUS_ARVALID(dec_axi_ARVALID),
    .s_axi_CONTROL_BUS_ARREADY(dec_axi_ARREADY),
    .s_axi_CONTROL_BUS_RDATA(dec_axi_RDATA),
    .s_axi_CONTROL_BUS_RRESP(dec_axi_RRESP),
    .s_axi_CONTROL_BUS_RVALID(dec_axi_RVALID),
    .s_axi_CONTROL_BUS_RREADY(dec_axi_RREADY),
    .in_stream_TVALID(llr_TVALID),
    .in_stream_TREADY(llr_TREADY),
    .in_stream_TDATA(llr_TDATA),
    .in_stream_TLAST(llr_TLAST),
    .out_final_stream_TVALID(dec_out_TVALID),
    .out_final_stream_TREADY(dec_out_TREADY),
    .out_final_stream_TDATA(dec_out_TDATA),
    .out_final_stream_TLAST(dec_out_TLAST)
  );
endmodule
