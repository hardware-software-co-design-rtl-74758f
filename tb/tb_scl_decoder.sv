// tb_scl_decoder: the list decoder core.
//  - List size 1 against a reference successive-cancellation decoder
//    (recursive min-sum, same saturation and tie rule) on very noisy LLRs:
//    the decoded bits must match the reference exactly.
//  - List sizes 2 and 4 on moderately noisy codewords of a CRC-encoded
//    block: the transmitted block must come back with crc_ok set.
//  - The same with three parity-check bits (PC-polar), list sizes 1 and 4.
//  - Pure-noise input: no candidate can pass a 24-bit CRC, so crc_ok
//    must be low.
module tb_scl_decoder;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic llr_we, start, done, crc_ok;
  logic [9:0] llr_addr, pi_k;
  llr_t llr_wdata;
  logic [3:0] n_log, list_size;
  logic [9:0] k_len;
  logic [4:0] crc_len;
  logic [NMAX-1:0] info_mask, pc_mask;
  logic [KMAX-1:0] out_bits;
  int checks = 0, failures = 0;

  scl_decoder #(.L(4)) dut (.clk(clk), .rst_n(rst_n), .llr_we(llr_we), .llr_addr(llr_addr),
    .llr_wdata(llr_wdata), .start(start), .n_log(n_log), .k_len(k_len), .crc_len(crc_len),
    .list_size(list_size), .info_mask(info_mask), .pc_mask(pc_mask), .pi_rd_k(pi_k), .pi_rd_pi(pi_k),
    .done(done), .crc_ok(crc_ok), .out_bits(out_bits));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int sat(int v);
    if (v > 8191) return 8191;
    if (v < -8191) return -8191;
    return v;
  endfunction

  // reference SC decoder: returns u estimates and the re-encoded x
  function automatic void ref_sc(intvec_t alpha, bitvec_t frz, output bitvec_t u, output bitvec_t x);
    int sz, h;
    intvec_t al, ar;
    bitvec_t fl, fr, ul, ur, xl, xr;
    sz = alpha.size();
    u = new[sz];
    x = new[sz];
    if (sz == 1) begin
      u[0] = frz[0] ? 1'b0 : (alpha[0] < 0);
      x[0] = u[0];
      return;
    end
    h = sz / 2;
    al = new[h]; ar = new[h]; fl = new[h]; fr = new[h];
    for (int i = 0; i < h; i++) begin
      int a, b, m;
      a = alpha[i]; b = alpha[i + h];
      m = ((a < 0 ? -a : a) < (b < 0 ? -b : b)) ? (a < 0 ? -a : a) : (b < 0 ? -b : b);
      al[i] = (((a > 0) == (b > 0)) ? 1 : -1) * m;
      fl[i] = frz[i];
      fr[i] = frz[i + h];
    end
    ref_sc(al, fl, ul, xl);
    for (int i = 0; i < h; i++) ar[i] = sat(alpha[i + h] + (xl[i] ? -alpha[i] : alpha[i]));
    ref_sc(ar, fr, ur, xr);
    for (int i = 0; i < h; i++) begin
      u[i] = ul[i]; u[i + h] = ur[i];
      x[i] = xl[i] ^ xr[i]; x[i + h] = xr[i];
    end
  endfunction

  task automatic decode(intvec_t llr, int n, int k, int crcl, int ls);
    for (int i = 0; i < llr.size(); i++) begin
      @(negedge clk);
      llr_we = 1; llr_addr = 10'(i); llr_wdata = llr_t'(llr[i]);
    end
    @(negedge clk);
    llr_we = 0;
    n_log = 4'(n); k_len = 10'(k); crc_len = 5'(crcl); list_size = 4'(ls); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  // npc > 0: npc of the K+npc most reliable channels become parity-check
  // bits (removed from mask, marked in pcm)
  task automatic make_block(int n, int k, int crcl, real sigma, int npc, output intvec_t llr,
                            output bitvec_t blk, output bitvec_t mask, output bitvec_t pcm);
    bitvec_t msg, crc, u, d;
    int nn, kk;
    nn = 1 << n;
    msg = new[k - crcl];
    foreach (msg[i]) msg[i] = 1'($urandom);
    crc = ref_crc(msg, crcl);
    blk = new[k];
    for (int i = 0; i < k; i++) blk[i] = (i < k - crcl) ? msg[i] : crc[i - (k - crcl)];
    mask = ref_mask(nn, k + npc, nn);
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
    u = ref_fill_pc(mask, pcm, blk);
    d = ref_encode(u);
    llr = new[nn];
    for (int i = 0; i < nn; i++)
      llr[i] = sat((d[i] ? -64 : 64) + int'($floor(sigma * 64.0 * ref_gauss() + 0.5)));
  endtask

  initial begin
    llr_we = 0; llr_addr = 0; llr_wdata = 0; start = 0; n_log = 5; list_size = 1;
    k_len = 0; crc_len = 24; info_mask = '0; pc_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // list size 1 against the reference SC decoder, heavy noise
    for (int t = 0; t < 4; t++) begin
      intvec_t llr;
      bitvec_t blk, mask, pcm, frz, ru, rx;
      int n, k, kk;
      n = 5 + t;
      k = (1 << n) / 2;
      make_block(n, k, 11, 1.0, 0, llr, blk, mask, pcm);
      info_mask = '0;
      frz = new[1 << n];
      foreach (mask[i]) begin
        info_mask[i] = mask[i];
        frz[i] = !mask[i];
      end
      ref_sc(llr, frz, ru, rx);
      decode(llr, n, k, 11, 1);
      kk = 0;
      for (int i = 0; i < (1 << n); i++)
        if (mask[i]) begin
          check(out_bits[kk] == ru[i], $sformatf("SC N=%0d info bit %0d", 1 << n, kk));
          kk++;
        end
    end
    // list sizes 2 and 4, moderate noise: block must be recovered
    // runs 4..7 add three parity-check bits (PC-polar)
    for (int t = 0; t < 8; t++) begin
      intvec_t llr;
      bitvec_t blk, mask, pcm;
      int n, k, ls, npc;
      n = 6 + (t % 4);
      k = (1 << n) / 2 + 5;
      ls = (t % 2) ? 4 : (t < 4 ? 2 : 1);
      npc = (t < 4) ? 0 : 3;
      make_block(n, k, 24, (t < 4) ? 0.6 : 0.5, npc, llr, blk, mask, pcm);
      info_mask = '0;
      pc_mask = '0;
      foreach (mask[i]) begin
        info_mask[i] = mask[i];
        pc_mask[i] = pcm[i];
      end
      decode(llr, n, k, 24, ls);
      check(crc_ok, $sformatf("L=%0d N=%0d PC=%0d CRC passes", ls, 1 << n, npc));
      for (int i = 0; i < k; i++) check(out_bits[i] == blk[i], $sformatf("L=%0d N=%0d PC=%0d bit %0d", ls, 1 << n, npc, i));
    end
    pc_mask = '0;
    // pure noise
    begin
      intvec_t llr;
      llr = new[128];
      foreach (llr[i]) llr[i] = $urandom_range(400, 0) - 200;
      info_mask = '0;
      for (int i = 64; i < 128; i++) info_mask[i] = 1'b1;
      decode(llr, 7, 64, 24, 4);
      check(!crc_ok, "pure noise fails the CRC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
