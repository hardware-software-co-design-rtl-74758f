// tb_polar_encoder_core: random blocks and information masks for N = 32
// to 1024; u and the codeword c must equal the reference (mask placement
// and butterfly transform), and the run must take 2N+1 cycles. Half of
// the runs also carry parity-check bits, checked against the standard's
// shift-register rule.
module tb_polar_encoder_core;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  logic [3:0] n_log;
  logic [NMAX-1:0] info_mask, pc_mask, u, c;
  logic [KMAX-1:0] bits;
  int checks = 0, failures = 0;

  polar_encoder_core dut (.clk(clk), .rst_n(rst_n), .start(start), .n_log(n_log),
    .info_mask(info_mask), .pc_mask(pc_mask), .bits(bits), .u(u), .c(c), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    start = 0; n_log = 5; info_mask = '0; pc_mask = '0; bits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      int n, nn, cyc;
      bitvec_t ru, rc, mi, mp, bv;
      n = 5 + (t % 6);
      nn = 1 << n;
      // runs 8..15 add parity-check positions (disjoint from information)
      info_mask = '0;
      pc_mask = '0;
      for (int i = 0; i < nn; i++) begin
        info_mask[i] = 1'($urandom);
        if (t >= 8 && !info_mask[i]) pc_mask[i] = ($urandom % 4) == 0;
      end
      for (int i = 0; i < KMAX; i++) bits[i] = 1'($urandom);
      mi = new[nn]; mp = new[nn]; bv = new[KMAX];
      for (int i = 0; i < nn; i++) begin
        mi[i] = info_mask[i];
        mp[i] = pc_mask[i];
      end
      for (int i = 0; i < KMAX; i++) bv[i] = bits[i];
      ru = ref_fill_pc(mi, mp, bv);
      rc = ref_encode(ru);
      @(negedge clk);
      n_log = 4'(n); start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == 2 * nn + 1, $sformatf("N=%0d took %0d cycles", nn, cyc));
      for (int i = 0; i < nn; i++) begin
        check(u[i] == ru[i], $sformatf("N=%0d u[%0d]", nn, i));
        check(c[i] == rc[i], $sformatf("N=%0d c[%0d]", nn, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
