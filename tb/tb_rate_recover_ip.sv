// tb_rate_recover_ip: the receiver front end on its own. Random rate-matched
// bit sequences are modulated by the reference constellation, lightly
// perturbed, streamed in as I/Q words (with random gaps) and the N LLRs
// coming out (with random back-pressure) are compared with the reference
// rate recovery: punctured positions must be exactly 0, shortened
// positions the largest positive LLR, every other position must carry
// the sign of the transmitted bit (positive = 0) with a non-zero
// magnitude; with repetition only the first N values are used. TLAST must
// mark the N-th word. Bad parameters must raise the error interrupt.
module tb_rate_recover_ip;
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

  rate_recover_ip dut (
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
    .rSig_stream_TVALID(in_valid), .rSig_stream_TREADY(in_ready),
    .rSig_stream_TDATA(in_data), .rSig_stream_TLAST(in_last),
    .out_stream_TVALID(out_valid), .out_stream_TREADY(out_ready),
    .out_stream_TDATA(out_data), .out_stream_TLAST(out_last));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int k, int e, int nn, bit ibil, int scheme);
    bitvec_t tx;
    intvec_t sgn, exp;
    int bps, nsym, words [];
    int got [$];
    bit lasts [$];
    bps = ref_bps(scheme);
    nsym = (e + bps - 1) / bps;
    tx = new[e];
    foreach (tx[i]) tx[i] = 1'($urandom);
    // expected: +1 / -1 for a transmitted bit, 0 punctured, 2 shortened
    sgn = new[e];
    foreach (sgn[i]) sgn[i] = tx[i] ? -1 : 1;
    exp = ref_rate_recover(sgn, nn, k, ibil, 2);
    words = new[2 * nsym];
    for (int s = 0; s < nsym; s++) begin
      bit b6 [6];
      int si, sq;
      for (int j = 0; j < 6; j++) b6[j] = (j < bps && s * bps + j < e) ? tx[s * bps + j] : 1'b0;
      ref_modulate(scheme, b6, si, sq);
      words[2 * s] = si + $urandom_range(2, 0) - 1;
      words[2 * s + 1] = sq + $urandom_range(2, 0) - 1;
    end
    axi_write('h04, k); axi_write('h08, e); axi_write('h0C, nn);
    axi_write('h10, ibil); axi_write('h14, scheme);
    axi_write('h00, 1);
    fork
      for (int i = 0; i < 2 * nsym; i++) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_data = 32'(words[i]);
        in_last = (i == 2 * nsym - 1);
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
    check(got.size() == nn, $sformatf("LLR count %0d / %0d", got.size(), nn));
    for (int i = 0; i < nn && i < got.size(); i++) begin
      string w;
      w = $sformatf("K=%0d E=%0d N=%0d mod=%0d LLR %0d = %0d (class %0d)", k, e, nn, scheme, i, got[i], exp[i]);
      case (exp[i])
        0: check(got[i] == 0, w);
        2: check(got[i] == 8191, w);
        1: check(got[i] > 0, w);
        default: check(got[i] < 0, w);
      endcase
      check(lasts[i] == (i == nn - 1), "TLAST placement");
    end
    axi_wait_done();
    check(!interrupt, "no error for valid parameters");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    //   K    E    N  iBIL mod
    run(64, 108, 128, 0, 1);   // shortening
    run(61, 200, 256, 1, 2);   // puncturing
    run(36, 600, 512, 1, 3);   // repetition
    run(44, 96, 128, 0, 0);    // BPSK
    run(30, 37, 64, 1, 3);     // partial last symbol
    run(164, 400, 512, 1, 1);
    // error: N not a power of two
    axi_write('h0C, 100);
    axi_write('h00, 1);
    axi_wait_done();
    check(interrupt, "bad N raises the error interrupt");
    check(!in_ready, "no input consumed after an error");
    axi_write('h00, 0);
    check(!interrupt, "CTRL write clears the error");
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
