// tb_polar_workloads: the block sizes of the acceleration measurements,
// run through the whole SoC fabric at its default sizes.
//
// Encoder configurations (K, E, crcLen) = (1018, 2048, 11), (307, 360, 24),
// (54, 124, 24), (20, 124, 11); rate-recover configurations (K, E) with
// crcLen 24 = (56, 864), (56, 124), (67, 128), (307, 360); decoder
// configurations (K, N) = (164, 256), (1011, 1024), (128, 512), (43, 256)
// with list size 4 (E = N). Each block goes encoder -> noise ->
// rate recover -> decoder exactly as in tb_polar_soc_top, with every symbol
// and every decoded bit compared against the reference, and the cycles
// from start to the last output word of the encoder and of the receive
// chain are printed per block. QPSK, light noise; downlink settings
// (nMax 9, iIL 1, iBIL 0) for crcLen 24 and uplink ones (nMax 10, iIL 0,
// iBIL 1) for crcLen 11; the decoder rows use nMax 10. Input interleaving
// only exists for K <= 164, so the K = 307 rows run without it.
module tb_polar_workloads;
  import polar_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // AXI-Lite buses
  logic        enc_interrupt, rr_interrupt, dec_interrupt;
  logic [6:0]  axi_awaddr [3];
  logic        axi_awvalid [3];
  logic        axi_awready [3];
  logic [31:0] axi_wdata [3];
  logic        axi_wvalid [3];
  logic        axi_wready [3];
  logic [1:0]  axi_bresp [3];
  logic        axi_bvalid [3];
  logic [6:0]  axi_araddr [3];
  logic        axi_arvalid [3];
  logic        axi_arready [3];
  logic [31:0] axi_rdata [3];
  logic [1:0]  axi_rresp [3];
  logic        axi_rvalid [3];

  logic        msg_in_TVALID, msg_in_TREADY, msg_in_TLAST;
  logic [31:0] msg_in_TDATA;
  logic        symb_out_TVALID, symb_out_TREADY, symb_out_TLAST;
  logic [31:0] symb_out_TDATA;
  logic        rsig_in_TVALID, rsig_in_TREADY, rsig_in_TLAST;
  logic [31:0] rsig_in_TDATA;
  logic        dec_out_TVALID, dec_out_TREADY, dec_out_TLAST;
  logic [31:0] dec_out_TDATA;

  polar_soc_top dut (
    .clk(clk), .rst_n(rst_n),
    .enc_interrupt(enc_interrupt),
    .enc_axi_AWADDR(axi_awaddr[0]), .enc_axi_AWVALID(axi_awvalid[0]), .enc_axi_AWREADY(axi_awready[0]),
    .enc_axi_WDATA(axi_wdata[0]), .enc_axi_WSTRB(4'hF), .enc_axi_WVALID(axi_wvalid[0]), .enc_axi_WREADY(axi_wready[0]),
    .enc_axi_BRESP(axi_bresp[0]), .enc_axi_BVALID(axi_bvalid[0]), .enc_axi_BREADY(1'b1),
    .enc_axi_ARADDR(axi_araddr[0]), .enc_axi_ARVALID(axi_arvalid[0]), .enc_axi_ARREADY(axi_arready[0]),
    .enc_axi_RDATA(axi_rdata[0]), .enc_axi_RRESP(axi_rresp[0]), .enc_axi_RVALID(axi_rvalid[0]), .enc_axi_RREADY(1'b1),
    .rr_interrupt(rr_interrupt),
    .rr_axi_AWADDR(axi_awaddr[1]), .rr_axi_AWVALID(axi_awvalid[1]), .rr_axi_AWREADY(axi_awready[1]),
    .rr_axi_WDATA(axi_wdata[1]), .rr_axi_WSTRB(4'hF), .rr_axi_WVALID(axi_wvalid[1]), .rr_axi_WREADY(axi_wready[1]),
    .rr_axi_BRESP(axi_bresp[1]), .rr_axi_BVALID(axi_bvalid[1]), .rr_axi_BREADY(1'b1),
    .rr_axi_ARADDR(axi_araddr[1]), .rr_axi_ARVALID(axi_arvalid[1]), .rr_axi_ARREADY(axi_arready[1]),
    .rr_axi_RDATA(axi_rdata[1]), .rr_axi_RRESP(axi_rresp[1]), .rr_axi_RVALID(axi_rvalid[1]), .rr_axi_RREADY(1'b1),
    .dec_interrupt(dec_interrupt),
    .dec_axi_AWADDR(axi_awaddr[2]), .dec_axi_AWVALID(axi_awvalid[2]), .dec_axi_AWREADY(axi_awready[2]),
    .dec_axi_WDATA(axi_wdata[2]), .dec_axi_WSTRB(4'hF), .dec_axi_WVALID(axi_wvalid[2]), .dec_axi_WREADY(axi_wready[2]),
    .dec_axi_BRESP(axi_bresp[2]), .dec_axi_BVALID(axi_bvalid[2]), .dec_axi_BREADY(1'b1),
    .dec_axi_ARADDR(axi_araddr[2]), .dec_axi_ARVALID(axi_arvalid[2]), .dec_axi_ARREADY(axi_arready[2]),
    .dec_axi_RDATA(axi_rdata[2]), .dec_axi_RRESP(axi_rresp[2]), .dec_axi_RVALID(axi_rvalid[2]), .dec_axi_RREADY(1'b1),
    .msg_in_TVALID(msg_in_TVALID), .msg_in_TREADY(msg_in_TREADY), .msg_in_TDATA(msg_in_TDATA), .msg_in_TLAST(msg_in_TLAST),
    .symb_out_TVALID(symb_out_TVALID), .symb_out_TREADY(symb_out_TREADY), .symb_out_TDATA(symb_out_TDATA), .symb_out_TLAST(symb_out_TLAST),
    .rsig_in_TVALID(rsig_in_TVALID), .rsig_in_TREADY(rsig_in_TREADY), .rsig_in_TDATA(rsig_in_TDATA), .rsig_in_TLAST(rsig_in_TLAST),
    .dec_out_TVALID(dec_out_TVALID), .dec_out_TREADY(dec_out_TREADY), .dec_out_TDATA(dec_out_TDATA), .dec_out_TLAST(dec_out_TLAST)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  int cnt_punct = 0, cnt_short = 0, cnt_rep = 0, cnt_bil = 0, cnt_iil = 0;
  int cnt_mod [4] = '{0, 0, 0, 0};
  int cnt_crc6 = 0, cnt_crc11 = 0, cnt_crc24 = 0;
  int cnt_prune = 0, cnt_clone = 0, cnt_crc_reject = 0, cnt_sc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // decoder mechanisms, observed inside the list decoder
  always @(posedge clk) begin
    if (dut.u_dec.u_dec.state == 4'd2) begin // S_DECIDE
      if (!dut.u_dec.u_dec.frozen &&
          2 * $countones(dut.u_dec.u_dec.active) > int'(dut.u_dec.u_dec.list_size))
        cnt_prune++;
      if (dut.u_dec.u_dec.clone_en != '0) cnt_clone++;
    end
    if (dut.u_dec.u_dec.state == 4'd7) begin // S_SELECT
      for (int l = 0; l < 4; l++)
        if (dut.u_dec.u_dec.active[l] && dut.u_dec.u_dec.crc_rem[l] != 0) cnt_crc_reject++;
    end
  end

  task automatic axi_write(int bus, int addr, int data);
    @(negedge clk);
    axi_awaddr[bus]  = 7'(addr);
    axi_wdata[bus]   = 32'(data);
    axi_awvalid[bus] = 1'b1;
    axi_wvalid[bus]  = 1'b1;
    do @(posedge clk); while (!axi_awready[bus]);
    @(negedge clk);
    axi_awvalid[bus] = 1'b0;
    axi_wvalid[bus]  = 1'b0;
    while (!axi_bvalid[bus]) @(negedge clk);
  endtask

  task automatic axi_read(int bus, int addr, output int data);
    @(negedge clk);
    axi_araddr[bus]  = 7'(addr);
    axi_arvalid[bus] = 1'b1;
    do @(posedge clk); while (!axi_arready[bus]);
    @(negedge clk);
    axi_arvalid[bus] = 1'b0;
    while (!axi_rvalid[bus]) @(negedge clk);
    data = int'(axi_rdata[bus]);
  endtask

  task automatic load_tables(int bus, bitvec_t mask, int pmax [164]);
    axi_write(bus, 'h40, 0);
    for (int w = 0; w < 32; w++) begin
      int v;
      v = 0;
      for (int b = 0; b < 32; b++)
        if (32 * w + b < mask.size() && mask[32 * w + b]) v = v | (1 << b);
      axi_write(bus, 'h44, v);
    end
    axi_write(bus, 'h40, 256);
    for (int m = 0; m < 164; m++) axi_write(bus, 'h44, pmax[m]);
  endtask

  // one block through the whole chain
  task automatic run_block(int a, int crclen, int e, int nmax, bit iil, bit ibil,
                           int scheme, int lsize, real sigma_frac);
    bitvec_t msg, crc, blk, blk_int, u, d, tx;
    bitvec_t mask;
    intvec_t pi;
    int pmax [164];
    int k, nn, n, bps, nsym, kk;
    int exp_i [], exp_q [];
    int rx [];
    int got_i [$], got_q [$];
    bit got_bits [$];
    int unit, st;
    longint t0, t1, t2;
    real sigma;

    k  = a + crclen;
    n  = ref_n(k, e, nmax);
    nn = 1 << n;
    bps = ref_bps(scheme);
    nsym = (e + bps - 1) / bps;
    $display("block: A=%0d crcLen=%0d K=%0d E=%0d N=%0d iIL=%0d iBIL=%0d mod=%0d L=%0d",
             a, crclen, k, e, nn, iil, ibil, scheme, lsize);

    if (e >= nn) cnt_rep++;
    else if (ref_puncture(k, e)) cnt_punct++;
    else cnt_short++;
    if (ibil) cnt_bil++;
    if (iil) cnt_iil++;
    cnt_mod[scheme]++;
    if (crclen == 6) cnt_crc6++;
    if (crclen == 11) cnt_crc11++;
    if (crclen == 24) cnt_crc24++;
    if (lsize == 1) cnt_sc++;

    // reference chain
    msg = new[a];
    foreach (msg[i]) msg[i] = 1'($urandom);
    crc = ref_crc(msg, crclen);
    blk = new[k];
    for (int i = 0; i < a; i++) blk[i] = msg[i];
    for (int i = 0; i < crclen; i++) blk[a + i] = crc[i];
    // random master interleaver table (a permutation of 0..163)
    for (int m = 0; m < 164; m++) pmax[m] = m;
    for (int m = 163; m > 0; m--) begin
      int j, t;
      j = $urandom_range(m, 0);
      t = pmax[m]; pmax[m] = pmax[j]; pmax[j] = t;
    end
    pi = ref_il(pmax, k, iil);
    blk_int = new[k];
    for (int i = 0; i < k; i++) blk_int[i] = blk[pi[i]];
    mask = ref_mask(nn, k, e);
    u = new[nn];
    kk = 0;
    for (int i = 0; i < nn; i++) begin
      u[i] = 0;
      if (mask[i]) begin
        u[i] = blk_int[kk];
        kk++;
      end
    end
    d  = ref_encode(u);
    tx = ref_rate_match(d, k, e, ibil);
    exp_i = new[nsym];
    exp_q = new[nsym];
    for (int s = 0; s < nsym; s++) begin
      bit b6 [6];
      for (int j = 0; j < 6; j++) b6[j] = (j < bps && s * bps + j < e) ? tx[s * bps + j] : 1'b0;
      ref_modulate(scheme, b6, exp_i[s], exp_q[s]);
    end

    // program the three IPs
    load_tables(0, mask, pmax);
    load_tables(2, mask, pmax);
    axi_write(0, 'h04, a);     axi_write(0, 'h08, e);    axi_write(0, 'h0C, crclen);
    axi_write(0, 'h10, nmax);  axi_write(0, 'h14, iil);  axi_write(0, 'h18, ibil);
    axi_write(0, 'h1C, scheme);
    axi_write(1, 'h04, k);     axi_write(1, 'h08, e);    axi_write(1, 'h0C, nn);
    axi_write(1, 'h10, ibil);  axi_write(1, 'h14, scheme);
    axi_write(2, 'h04, k);     axi_write(2, 'h08, e);    axi_write(2, 'h0C, nn);
    axi_write(2, 'h10, lsize); axi_write(2, 'h14, crclen); axi_write(2, 'h18, nmax);
    axi_write(2, 'h1C, iil);

    // encode
    axi_write(0, 'h00, 1);
    t0 = cyc;
    fork
      begin
        for (int i = 0; i < a; i++) begin
          @(negedge clk);
          msg_in_TVALID = 1'b1;
          msg_in_TDATA  = {31'd0, msg[i]};
          msg_in_TLAST  = (i == a - 1);
          do @(posedge clk); while (!msg_in_TREADY);
        end
        @(negedge clk);
        msg_in_TVALID = 1'b0;
      end
      begin
        bit last_seen;
        last_seen = 0;
        symb_out_TREADY = 1'b1;
        while (!last_seen) begin
          @(posedge clk);
          if (symb_out_TVALID && symb_out_TREADY) begin
            if (got_i.size() == got_q.size()) got_i.push_back(int'(signed'(symb_out_TDATA)));
            else got_q.push_back(int'(signed'(symb_out_TDATA)));
            last_seen = symb_out_TLAST;
          end
        end
      end
    join
    t1 = cyc;
    check(got_i.size() == nsym && got_q.size() == nsym, "symbol count");
    for (int s = 0; s < nsym && s < got_q.size(); s++) begin
      check(got_i[s] == exp_i[s] && got_q[s] == exp_q[s],
            $sformatf("symbol %0d: got %0d,%0d expected %0d,%0d", s, got_i[s], got_q[s], exp_i[s], exp_q[s]));
    end
    do axi_read(0, 'h00, st); while (!st[1] && !st[2]);
    check(!enc_interrupt, "encoder error flag");

    // channel: Gaussian noise, sigma relative to the per-axis unit
    unit = (scheme < 2) ? 45 : (scheme == 2) ? 20 : 10;
    sigma = sigma_frac * real'(unit);
    rx = new[2 * nsym];
    for (int s = 0; s < nsym; s++) begin
      rx[2 * s]     = exp_i[s] + int'($floor(sigma * ref_gauss() + 0.5));
      rx[2 * s + 1] = exp_q[s] + int'($floor(sigma * ref_gauss() + 0.5));
    end

    // receive: rate recover feeds the decoder
    axi_write(2, 'h00, 1);
    axi_write(1, 'h00, 1);
    t2 = cyc;
    fork
      begin
        for (int i = 0; i < 2 * nsym; i++) begin
          @(negedge clk);
          rsig_in_TVALID = 1'b1;
          rsig_in_TDATA  = 32'(rx[i]);
          rsig_in_TLAST  = (i == 2 * nsym - 1);
          do @(posedge clk); while (!rsig_in_TREADY);
        end
        @(negedge clk);
        rsig_in_TVALID = 1'b0;
      end
      begin
        bit last_seen;
        last_seen = 0;
        dec_out_TREADY = 1'b1;
        while (!last_seen) begin
          @(posedge clk);
          if (dec_out_TVALID && dec_out_TREADY) begin
            got_bits.push_back(dec_out_TDATA[0]);
            last_seen = dec_out_TLAST;
          end
        end
      end
    join
    $display("  cycles: encoder %0d, rate recover + decoder %0d", t1 - t0, cyc - t2);
    check(got_bits.size() == k, $sformatf("decoded length %0d", got_bits.size()));
    for (int i = 0; i < k && i < got_bits.size(); i++)
      check(got_bits[i] == blk[i], $sformatf("decoded bit %0d", i));
    check(!dec_interrupt, "decoder CRC flag");
    check(!rr_interrupt, "rate recover error flag");
  endtask

  initial begin
    for (int b = 0; b < 3; b++) begin
      axi_awvalid[b] = 0; axi_wvalid[b] = 0; axi_arvalid[b] = 0;
      axi_awaddr[b] = 0; axi_wdata[b] = 0; axi_araddr[b] = 0;
    end
    msg_in_TVALID = 0; msg_in_TDATA = 0; msg_in_TLAST = 0;
    rsig_in_TVALID = 0; rsig_in_TDATA = 0; rsig_in_TLAST = 0;
    symb_out_TREADY = 1; dec_out_TREADY = 1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // encoder rows: A = K - crcLen
    run_block(1018 - 11, 11, 2048, 10, 0, 1, 1, 4, 0.30);
    run_block(307 - 24, 24, 360, 9, 0, 0, 1, 4, 0.15);  // K > 164: no input interleaving
    run_block(54 - 24, 24, 124, 9, 1, 0, 1, 4, 0.40);
    run_block(20 - 11, 11, 124, 10, 0, 1, 1, 4, 0.40);
    // rate recover rows, crcLen 24
    run_block(56 - 24, 24, 864, 9, 1, 0, 1, 4, 0.50);
    run_block(56 - 24, 24, 124, 9, 1, 0, 1, 4, 0.40);
    run_block(67 - 24, 24, 128, 9, 1, 0, 1, 4, 0.40);
    run_block(307 - 24, 24, 360, 9, 0, 0, 1, 4, 0.15);  // K > 164: no input interleaving
    // decoder rows (K, N) with E = N
    run_block(164 - 24, 24, 256, 10, 1, 0, 1, 4, 0.30);
    run_block(1011 - 11, 11, 1024, 10, 0, 1, 1, 4, 0.05);
    run_block(128 - 24, 24, 512, 10, 1, 0, 1, 4, 0.40);
    run_block(43 - 24, 24, 256, 10, 1, 0, 1, 4, 0.40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
