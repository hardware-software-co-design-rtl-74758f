// tb_rate_recover: random LLRs in transmitted order through repetition,
// puncturing and shortening, with and without bit deinterleaving; each of
// the N outputs must equal the reference (explicit inverse triangle,
// inverse bit selection, inverse sub-block interleaver). The read phase
// must deliver one LLR per cycle.
module tb_rate_recover;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ibil, in_valid, in_ready, out_valid, out_last, out_ready;
  logic [3:0] n_log;
  logic [13:0] e_len;
  logic [9:0] k_len;
  llr_t in_llr, out_llr;
  int checks = 0, failures = 0;

  rate_recover dut (.clk(clk), .rst_n(rst_n), .start(start), .n_log(n_log), .e_len(e_len),
    .k_len(k_len), .ibil(ibil), .in_valid(in_valid), .in_llr(in_llr), .in_ready(in_ready),
    .out_valid(out_valid), .out_llr(out_llr), .out_last(out_last), .out_ready(out_ready));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int n, int k, int e, bit bil);
    intvec_t f, d;
    int nn, got, first, last_cyc, cyc;
    nn = 1 << n;
    f = new[e];
    foreach (f[i]) f[i] = $urandom_range(4000, 0) - 2000;
    d = ref_rate_recover(f, nn, k, bil, 8191);
    @(negedge clk);
    n_log = 4'(n); k_len = 10'(k); e_len = 14'(e); ibil = bil; start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < e; i++) begin
      in_valid = 1;
      in_llr = llr_t'(f[i]);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 0;
    got = 0;
    cyc = 0;
    first = -1;
    last_cyc = -1;
    out_ready = 1;
    while (got < nn && cyc < 5000) begin
      @(posedge clk);
      cyc++;
      if (out_valid) begin
        if (first < 0) first = cyc;
        check(int'(out_llr) == d[got], $sformatf("N=%0d E=%0d out %0d: %0d expected %0d", nn, e, got, out_llr, d[got]));
        check(out_last == (got == nn - 1), "last flag");
        got++;
        last_cyc = cyc;
      end
    end
    check(got == nn, "output count");
    check(last_cyc - first == nn - 1, "one LLR per cycle");
    @(negedge clk);
  endtask

  initial begin
    start = 0; ibil = 0; in_valid = 0; in_llr = 0; out_ready = 0; n_log = 5; e_len = 0; k_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 10, 40, 0);
    run(7, 30, 100, 0);
    run(7, 70, 100, 0);
    run(8, 40, 200, 1);
    run(6, 50, 60, 1);
    run(9, 100, 700, 1);
    run(10, 500, 1500, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
