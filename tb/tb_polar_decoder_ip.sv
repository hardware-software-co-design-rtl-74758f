// tb_polar_decoder_ip: the decoder IP on its own. Blocks are CRC-encoded,
// input-interleaved and polar-encoded by the reference, mapped to LLRs
// with Gaussian noise and streamed in (random gaps); the K output bits
// (random back-pressure) must equal the transmitted CRC-encoded block in
// its original order, with TLAST on the last one and no error interrupt.
// Every list size 1..4 and CRC length is used. A block of pure noise must
// raise the error interrupt (no candidate passes the CRC), and out-of-range
// parameters must raise it without consuming data.
module tb_polar_decoder_ip;
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

  polar_decoder_ip dut (
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
    .in_stream_TVALID(in_valid), .in_stream_TREADY(in_ready),
    .in_stream_TDATA(in_data), .in_stream_TLAST(in_last),
    .out_final_stream_TVALID(out_valid), .out_final_stream_TREADY(out_ready),
    .out_final_stream_TDATA(out_data), .out_final_stream_TLAST(out_last));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int a, int crcl, int nn, bit iil, int ls, real sigma, bit noise_only);
    bitvec_t msg, crc, blk, bi, u, d, mask;
    intvec_t pi, llr;
    int pmax [164];
    int k, kk;
    bit got [$];
    bit lasts [$];
    k = a + crcl;
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
    mask = ref_mask(nn, k, nn);
    u = new[nn];
    kk = 0;
    for (int i = 0; i < nn; i++) begin
      u[i] = mask[i] ? bi[kk] : 1'b0;
      if (mask[i]) kk++;
    end
    d = ref_encode(u);
    llr = new[nn];
    for (int i = 0; i < nn; i++) begin
      int v;
      v = noise_only ? 0 : (d[i] ? -64 : 64);
      v += int'($floor(sigma * 64.0 * ref_gauss() + 0.5));
      llr[i] = (v > 8191) ? 8191 : (v < -8191) ? -8191 : v;
    end
    axi_load_tables(mask, pmax);
    axi_write('h04, k); axi_write('h08, nn); axi_write('h0C, nn); axi_write('h10, ls);
    axi_write('h14, crcl); axi_write('h18, 10); axi_write('h1C, iil);
    axi_write('h00, 1);
    fork
      for (int i = 0; i < nn; i++) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_data = 32'(llr[i]);
        in_last = (i == nn - 1);
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
            got.push_back(out_data[0]);
            lasts.push_back(out_last);
            seen = out_last;
          end
        end
        out_ready = 1'b1;
      end
    join
    axi_wait_done();
    check(got.size() == k, $sformatf("bit count %0d / %0d", got.size(), k));
    for (int i = 0; i < k && i < got.size(); i++) begin
      if (!noise_only) check(got[i] == blk[i], $sformatf("K=%0d N=%0d L=%0d bit %0d", k, nn, ls, i));
      check(lasts[i] == (i == k - 1), "TLAST placement");
    end
    if (noise_only) begin
      check(interrupt, "pure noise raises the CRC error interrupt");
      axi_write('h00, 0);
    end else begin
      check(!interrupt, $sformatf("K=%0d N=%0d L=%0d no CRC error", k, nn, ls));
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    //  A  crc   N  iIL L  sigma noise
    run(40, 24, 128, 1, 4, 0.55, 0);
    run(50, 11, 128, 0, 3, 0.50, 0);
    run(30, 6, 64, 0, 2, 0.45, 0);
    run(20, 24, 128, 1, 1, 0.30, 0);
    run(140, 24, 512, 1, 4, 0.50, 0);
    run(60, 24, 128, 0, 4, 1.00, 1);
    // error: list size 5
    axi_write('h10, 5);
    axi_write('h00, 1);
    axi_wait_done();
    check(interrupt, "bad list size raises the error interrupt");
    check(!in_ready, "no input consumed after an error");
    axi_write('h00, 0);
    check(!interrupt, "CTRL write clears the error");
    // error: input interleaving asked for K = 200 > 164
    axi_write('h10, 4); axi_write('h04, 200); axi_write('h0C, 256); axi_write('h1C, 1);
    axi_write('h00, 1);
    axi_wait_done();
    check(interrupt, "iIL with K > 164 raises the error interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
