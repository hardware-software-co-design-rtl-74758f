// axil_regs: AXI4-Lite parameter/control bus shared by the three polar IPs.
//
// 7-bit byte address, 32 registers of 32 bits (word index = addr[6:2]):
//   0x00 CTRL   bit0 ap_start (write 1 to start, clears when the core
//               accepts it), bit1 ap_done (sticky, cleared by reading
//               CTRL), bit2 ap_idle (read only)
//   0x04..0x3C  PARAM[1..15], plain read/write parameter registers; each
//               IP defines which fields it uses
//   0x40 TBL_ADDR  table address, increments after every TBL_DATA write
//   0x44 TBL_DATA  write: one table word goes to the IP (tbl_we pulse)
//   0x48 STATUS    bit0 error flag (sticky, cleared by writing CTRL)
// The interrupt output is the sticky error flag.
// A write is taken when AWVALID and WVALID are both high; the response is
// always OKAY. Write strobes are ignored (whole-word writes).
//
// Origin: the control bus, its 7-bit address and the
// ap_start/ap_done/ap_idle handshake follow the IP descriptions; the
// register addresses, the table port and the error/interrupt behaviour are
// this design's own choices. WSTRB is 4 bits and RRESP 2 bits, as
// AXI4-Lite requires.
module axil_regs (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [6:0]  awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [6:0]  araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  // core side
  output logic [31:0] param [16],
  output logic        ap_start,
  input  logic        ap_start_ack,
  input  logic        ap_done_set,
  input  logic        ap_idle,
  input  logic        err_set,
  output logic        tbl_we,
  output logic [15:0] tbl_addr,
  output logic [31:0] tbl_wdata,
  output logic        interrupt
);
  logic done_flag, err_flag;
  logic wr_fire, rd_fire;
  logic [4:0] wr_idx, rd_idx;

  assign wr_fire = awvalid && wvalid && !bvalid;
  assign awready = wr_fire;
  assign wready  = wr_fire;
  assign wr_idx  = awaddr[6:2];
  assign rd_fire = arvalid && !rvalid;
  assign arready = rd_fire;
  assign rd_idx  = araddr[6:2];
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;
  assign interrupt = err_flag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) param[i] <= '0;
      ap_start  <= 1'b0;
      done_flag <= 1'b0;
      err_flag  <= 1'b0;
      bvalid    <= 1'b0;
      rvalid    <= 1'b0;
      rdata     <= '0;
      tbl_we    <= 1'b0;
      tbl_addr  <= '0;
      tbl_wdata <= '0;
    end else begin
      tbl_we <= 1'b0;
      if (ap_start_ack) ap_start <= 1'b0;
      if (ap_done_set)  done_flag <= 1'b1;
      if (err_set)      err_flag  <= 1'b1;
      if (bvalid && bready) bvalid <= 1'b0;
      if (rvalid && rready) rvalid <= 1'b0;
      if (wr_fire) begin
        bvalid <= 1'b1;
        if (wr_idx == 5'd0) begin
          if (wdata[0]) ap_start <= 1'b1;
          err_flag <= 1'b0;
        end else if (wr_idx < 5'd16) begin
          param[wr_idx[3:0]] <= wdata;
        end else if (wr_idx == 5'd16) begin
          tbl_addr <= wdata[15:0];
        end else if (wr_idx == 5'd17) begin
          tbl_we    <= 1'b1;
          tbl_wdata <= wdata;
        end
      end
      if (tbl_we) tbl_addr <= tbl_addr + 16'd1;
      if (rd_fire) begin
        rvalid <= 1'b1;
        case (rd_idx)
          5'd0: begin
            rdata     <= {29'd0, ap_idle, done_flag, ap_start};
            done_flag <= ap_done_set;
          end
          5'd16:   rdata <= {16'd0, tbl_addr};
          5'd18:   rdata <= {31'd0, err_flag};
          default: rdata <= (rd_idx < 5'd16) ? param[rd_idx[3:0]] : 32'd0;
        endcase
      end
    end
  end

  // Unused strobe bits: whole-word writes only.
  logic unused_ok;
  assign unused_ok = ^wstrb;

  // Handshake rules of the slave.
  property p_bvalid_hold;
    @(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid;
  endproperty
  property p_rvalid_hold;
    @(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata);
  endproperty
  assert property (p_bvalid_hold);
  assert property (p_rvalid_hold);
endmodule
