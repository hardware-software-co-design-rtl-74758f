// tb_polar_soc_top: end-to-end test of the polar coding SoC fabric.
//
// For each configuration the testbench plays the processor: it programs
// the three IPs over their AXI4-Lite buses (parameters, information mask
// from a polarization-weight reference, interleaver master table), streams
// a random message into the encoder, checks every modulated symbol against
// the reference chain (CRC, interleaver, G_N, rate matching, constellation),
// adds Gaussian noise in place of the software channel, streams the noisy
// symbols into the rate-recover IP, which feeds the decoder on chip, and
// checks the decoded block against the transmitted one.
// Mechanisms counted (each must occur): puncturing, shortening,
// repetition, bit interleaving, input interleaving, each modulation,
// each CRC length, list pruning, path cloning, a list candidate rejected
// by the CRC, a decode with list size 1 and blocks with parity-check bits.
module tb_polar_soc_top;
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
  int cnt_punct = 0, cnt_short = 0, cnt_rep = 0, cnt_bil = 0, cnt_iil = 0;
  int cnt_mod [4] = '{0, 0, 0, 0};
  int cnt_crc6 = 0, cnt_crc11 = 0, cnt_crc24 = 0;
  int cnt_prune = 0, cnt_clone = 0, cnt_crc_reject = 0, cnt_sc = 0, cnt_pc = 0;

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

  // words 0..31: information mask, 32..63: parity-check mask
  task automatic load_tables(int bus, bitvec_t mask, bitvec_t pcm, int pmax [164]);
    axi_write(bus, 'h40, 0);
    for (int w = 0; w < 64; w++) begin
      int v;
      v = 0;
      for (int b = 0; b < 32; b++)
        if (w < 32 && 32 * w + b < mask.size() && mask[32 * w + b]) v = v | (1 << b);
        else if (w >= 32 && 32 * (w - 32) + b < pcm.size() && pcm[32 * (w - 32) + b]) v = v | (1 << b);
      axi_write(bus, 'h44, v);
    end
    axi_write(bus, 'h40, 256);
    for (int m = 0; m < 164; m++) axi_write(bus, 'h44, pmax[m]);
  endtask

  // one block through the whole chain
  task automatic run_block(int a, int crclen, int e, int nmax, bit iil, bit ibil,
                           int scheme, int lsize, real sigma_frac, int npc = 0);
    bitvec_t msg, crc, blk, blk_int, u, d, tx;
    bitvec_t mask, pcm;
    intvec_t pi;
    int pmax [164];
    int k, nn, n, bps, nsym, kk;
    int exp_i [], exp_q [];
    int rx [];
    int got_i [$], got_q [$];
    bit got_bits [$];
    int unit, st;
    real sigma;

    k  = a + crclen;
    n  = ref_n(k, e, nmax);
    nn = 1 << n;
    bps = ref_bps(scheme);
    nsym = (e + bps - 1) / bps;
    $display("block: A=%0d crcLen=%0d K=%0d E=%0d N=%0d iIL=%0d iBIL=%0d mod=%0d L=%0d PC=%0d",
             a, crclen, k, e, nn, iil, ibil, scheme, lsize, npc);

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
    if (npc > 0) cnt_pc++;

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
    // npc parity-check bits take npc random channels of the K+npc best
    mask = ref_mask(nn, k + npc, e);
    pcm = new[nn];
    foreach (pcm[i]) pcm[i] = 1'b0;
    kk = 0;
    while (kk < npc) begin
      int p;
      p = $urandom_range(nn - 1, 0);
      if (mask[p]) begin
        mask[p] = 1'b0;
        pcm[p] = 1'b1;
        kk++;
      end
    end
    u = ref_fill_pc(mask, pcm, blk_int);
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
    load_tables(0, mask, pcm, pmax);
    load_tables(2, mask, pcm, pmax);
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
    //        A  crc    E nmax iIL iBIL mod L  noise
    run_block(40, 24, 108,  9, 1, 0, 1, 4, 0.55);  // DCI, shortening, QPSK
    run_block(50, 11, 200, 10, 0, 1, 2, 4, 0.35);  // UCI, puncturing, 16QAM
    run_block(30,  6, 600, 10, 0, 1, 3, 2, 0.30);  // repetition, 64QAM
    run_block(20, 24,  96,  9, 1, 0, 0, 1, 0.20);  // BPSK, list size 1
    run_block(140, 24, 400, 9, 1, 0, 1, 4, 0.50);  // DCI, K = 164, N = 512
    run_block(1000, 11, 2048, 10, 0, 1, 1, 4, 0.10); // UCI, K = 1011, N = 1024
    run_block(14,  6, 120, 10, 0, 1, 1, 4, 0.40, 3); // UCI with 3 PC bits
    run_block(60, 11, 300, 10, 0, 1, 2, 2, 0.30, 3); // PC bits, 16QAM
    $display("mechanisms: punct=%0d short=%0d rep=%0d bil=%0d iil=%0d mod=%0d/%0d/%0d/%0d crc=%0d/%0d/%0d prune=%0d clone=%0d crc_reject=%0d sc=%0d",
             cnt_punct, cnt_short, cnt_rep, cnt_bil, cnt_iil, cnt_mod[0], cnt_mod[1], cnt_mod[2], cnt_mod[3],
             cnt_crc6, cnt_crc11, cnt_crc24, cnt_prune, cnt_clone, cnt_crc_reject, cnt_sc);
    check(cnt_punct > 0, "puncturing exercised");
    check(cnt_short > 0, "shortening exercised");
    check(cnt_rep > 0, "repetition exercised");
    check(cnt_bil > 0 && cnt_iil > 0, "interleavers exercised");
    for (int m = 0; m < 4; m++) check(cnt_mod[m] > 0, $sformatf("modulation %0d exercised", m));
    check(cnt_crc6 > 0 && cnt_crc11 > 0 && cnt_crc24 > 0, "all CRC lengths exercised");
    check(cnt_prune > 0, "list pruning exercised");
    check(cnt_clone > 0, "path cloning exercised");
    check(cnt_crc_reject > 0, "CRC rejection of a list candidate exercised");
    check(cnt_sc > 0, "list size 1 exercised");
    check(cnt_pc > 0, "parity-check bits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
