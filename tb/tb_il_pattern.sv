// tb_il_pattern: loads a random 164-entry master permutation, derives the
// pattern for several K with iIL = 1 and compares every entry with the
// reference selection rule; checks the derivation takes 165 cycles and
// that iIL = 0 gives the identity.
module tb_il_pattern;
  import polar_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tbl_we, start, iil, done;
  logic [7:0] tbl_addr, tbl_wdata;
  logic [9:0] k, rd_k, rd_pi;
  int checks = 0, failures = 0;
  int pmax [164];

  il_pattern dut (.clk(clk), .rst_n(rst_n), .tbl_we(tbl_we), .tbl_addr(tbl_addr),
    .tbl_wdata(tbl_wdata), .start(start), .iil(iil), .k(k), .done(done),
    .rd_k(rd_k), .rd_pi(rd_pi));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int ks [5] = '{164, 100, 36, 1, 64};
    tbl_we = 0; start = 0; iil = 0; k = 0; rd_k = 0; tbl_addr = 0; tbl_wdata = 0;
    for (int m = 0; m < 164; m++) pmax[m] = m;
    for (int m = 163; m > 0; m--) begin
      int j, t;
      j = $urandom_range(m, 0);
      t = pmax[m]; pmax[m] = pmax[j]; pmax[j] = t;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 164; m++) begin
      @(negedge clk);
      tbl_we = 1; tbl_addr = 8'(m); tbl_wdata = 8'(pmax[m]);
    end
    @(negedge clk);
    tbl_we = 0;
    foreach (ks[t]) begin
      intvec_t ref_p;
      int cyc;
      ref_p = ref_il(pmax, ks[t], 1'b1);
      @(negedge clk);
      k = 10'(ks[t]); iil = 1; start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == 165, $sformatf("derivation took %0d cycles", cyc));
      for (int i = 0; i < ks[t]; i++) begin
        rd_k = 10'(i);
        #1;
        check(int'(rd_pi) == ref_p[i], $sformatf("K=%0d pi(%0d)=%0d expected %0d", ks[t], i, rd_pi, ref_p[i]));
      end
    end
    @(negedge clk);
    k = 10'(500); iil = 0; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    for (int i = 0; i < 500; i += 7) begin
      rd_k = 10'(i);
      #1;
      check(int'(rd_pi) == i, "identity pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
