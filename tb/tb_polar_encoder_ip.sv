// tb_polar_encoder_ip: the transmitter IP on its own. For a set of
// configurations (every CRC length, modulation, puncturing / shortening /
// repetition, both interleavers on and off) the testbench programs the IP
// over AXI4-Lite, streams a random message with random valid gaps, takes
// the symbol stream with random back-pressure and compares every I/Q word
// and TLAST with the reference chain. It also checks that out-of-range
// parameters (including input interleaving with K > 164) raise the error
// interrupt without consuming data, and that a
// CTRL write clears it.
module tb_polar_encoder_ip;
  import polar_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  `include "axil_bfm.svh"
  logic interrupt;
  logic        in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = 0;
  logic        out_valid, out_ready = 1, out_last;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  polar_encoder_ip dut (
    .ap_clk(clk), .ap_rst_n(rst_n), .interrupt(interrupt),
    .s_axi_CONTROL_BUS_AWADDR(axi_awaddr), .s_axi_CONTROL_BUS_AWVALID(axi_awvalid),
    .s_axi_CONTROL_BUS_AWREADY(axi_awready), .s_axi_CONTROL_BUS_WDATA(axi_wdata),
    .s_axi_CONTROL_BUS_WSTRB(4'hF), .s_axi_CONTROL_BUS_WVALID(axi_wvalid),
    .s_axi_CONTROL_BUS_WREADY(axi_wready), .s_axi_CONTROL_BUS_BRESP(axi_bresp),
    .s_axi_CONTROL_BUS_BVALID(axi_bvalid), .s_axi_CONTROL_BUS_BREADY(1'b1),
    .s_axi_CONTROL_BUS_ARADDR(axi_araddr), .s_axi_CONTROL_BUS_ARVALID(axi_arvalid),
    .s_axi_CONTROL_BUS_ARREADY(axi_arready), .s_axi_CONTROL_BUS_RDATA(axi_rdata),
    .s_axi_CONTROL_BUS_RRESP(axi_rresp), .s_axi_CONTROL_BUS_RVALID(axi_rvalid),
    .s_axi_CONTROL_BUS_RREADY(1'b1),
    .msg_Instream_TVALID(in_valid), .msg_Instream_TREADY(in_ready),
    .msg_Instream_TDATA(in_data), .msg_Instream_TLAST(in_last),
    .symbMod_Outstream_TVALID(out_valid), .symbMod_Outstream_TREADY(out_ready),
    .symbMod_Outstream_TDATA(out_data), .symbMod_Outstream_TLAST(out_last));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int a, int crcl, int e, int nmax, bit iil, bit ibil, int scheme);
    bitvec_t msg, crc, blk, bi, u, d, tx, mask;
    intvec_t pi;
    int pmax [164];
    int k, nn, bps, nsym, kk, nwords;
    int got [$];
    bit lasts [$];
    k = a + crcl;
    nn = 1 << ref_n(k, e, nmax);
    bps = ref_bps(scheme);
    nsym = (e + bps - 1) / bps;
    msg = new[a];
    foreach (msg[i]) msg[i] = 1'($urandom);
    crc = ref_crc(msg, crcl);
    blk = new[k];
    for (int i = 0; i < k; i++) blk[i] = (i < a) ? msg[i] : crc[i - a];
    for (int m = 0; m < 164; m++) pmax[m] = m;
    for (int m = 163; m > 0; m--) begin
      int j, t;
      j = $urandom_range(m, 0);
      t = pmax[m]; pmax[m] = pmax[j]; pmax[j] = t;
    end
    pi = ref_il(pmax, k, iil);
    bi = new[k];
    for (int i = 0; i < k; i++) bi[i] = blk[pi[i]];
    mask = ref_mask(nn, k, e);
    u = new[nn];
    kk = 0;
    for (int i = 0; i < nn; i++) begin
      u[i] = mask[i] ? bi[kk] : 1'b0;
      if (mask[i]) kk++;
    end
    d = ref_encode(u);
    tx = ref_rate_match(d, k, e, ibil);

    axi_load_tables(mask, pmax);
    axi_write('h04, a); axi_write('h08, e); axi_write('h0C, crcl); axi_write('h10, nmax);
    axi_write('h14, iil); axi_write('h18, ibil); axi_write('h1C, scheme);
    axi_write('h00, 1);
    fork
      for (int i = 0; i < a; i++) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_data = {$urandom, 1'b0} | 32'(msg[i]);  // upper bits are ignored
        in_last = (i == a - 1);
        do @(posedge clk); while (!in_ready);
        @(negedge clk);
        in_valid = 1'b0;
      end
      begin
        bit seen;
        seen = 0;
        while (!seen) begin
          @(negedge clk);
          out_ready = ($urandom_range(3, 0) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            got.push_back(int'(signed'(out_data)));
            lasts.push_back(out_last);
            seen = out_last;
          end
        end
        out_ready = 1'b1;
      end
    join
    nwords = 2 * nsym;
    check(got.size() == nwords, $sformatf("word count %0d / %0d", got.size(), nwords));
    for (int s = 0; s < nsym && 2 * s + 1 < got.size(); s++) begin
      bit b6 [6];
      int ei, eq;
      for (int j = 0; j < 6; j++) b6[j] = (j < bps && s * bps + j < e) ? tx[s * bps + j] : 1'b0;
      ref_modulate(scheme, b6, ei, eq);
      check(got[2 * s] == ei && got[2 * s + 1] == eq,
            $sformatf("K=%0d E=%0d mod=%0d symbol %0d", k, e, scheme, s));
      check(lasts[2 * s] == 0 && lasts[2 * s + 1] == (s == nsym - 1), "TLAST placement");
    end
    axi_wait_done();
    check(!interrupt, "no error for valid parameters");
  endtask

  initial begin
    int st;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    //  A  crc   E  nmax iIL iBIL mod
    run(40, 24, 108, 9, 1, 0, 1);   // shortening
    run(50, 11, 200, 10, 0, 1, 2);  // puncturing
    run(30, 6, 600, 10, 0, 1, 3);   // repetition
    run(20, 24, 96, 9, 1, 0, 0);    // BPSK
    run(12, 6, 37, 10, 0, 1, 3);    // E not a multiple of 6: zero padding
    run(140, 24, 400, 9, 1, 1, 1);  // K = 164
    // error: crcLen 8 is not supported
    axi_write('h0C, 8);
    axi_write('h00, 1);
    axi_wait_done();
    check(interrupt, "bad crcLen raises the error interrupt");
    check(!in_ready, "no input consumed after an error");
    axi_read('h48, st);
    check(st[0], "status register shows the error");
    axi_write('h0C, 24);
    axi_write('h00, 0);
    check(!interrupt, "CTRL write clears the error");
    // error: E < K
    axi_write('h04, 100); axi_write('h08, 50);
    axi_write('h00, 1);
    axi_wait_done();
    check(interrupt, "E < K raises the error interrupt");
    axi_write('h00, 0);
    // error: input interleaving asked for K = 200 > 164
    axi_write('h04, 176); axi_write('h08, 400); axi_write('h0C, 24); axi_write('h14, 1);
    axi_write('h00, 1);
    axi_wait_done();
    check(interrupt, "iIL with K > 164 raises the error interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
