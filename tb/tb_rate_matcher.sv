// tb_rate_matcher: random codewords through repetition, puncturing and
// shortening, with and without the triangular bit interleaver; every
// output bit is compared with the reference, which builds the interleaver
// triangle explicitly. Output back-pressure is applied at random.
module tb_rate_matcher;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ibil, out_valid, out_bit, out_last, out_ready;
  logic [NMAX-1:0] cw;
  logic [3:0] n_log;
  logic [13:0] e_len;
  logic [9:0] k_len;
  int checks = 0, failures = 0;

  rate_matcher dut (.clk(clk), .rst_n(rst_n), .start(start), .cw(cw), .n_log(n_log),
    .e_len(e_len), .k_len(k_len), .ibil(ibil), .out_valid(out_valid), .out_bit(out_bit),
    .out_last(out_last), .out_ready(out_ready));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(int n, int k, int e, bit bil);
    bitvec_t d, f;
    int got;
    bit fin;
    d = new[1 << n];
    cw = '0;
    foreach (d[i]) begin
      d[i] = 1'($urandom);
      cw[i] = d[i];
    end
    f = ref_rate_match(d, k, e, bil);
    @(negedge clk);
    n_log = 4'(n); k_len = 10'(k); e_len = 14'(e); ibil = bil; start = 1;
    @(negedge clk);
    start = 0;
    got = 0;
    fin = 0;
    while (!fin) begin
      out_ready = 1'($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(got < e && out_bit == f[got], $sformatf("N=%0d E=%0d bit %0d", 1 << n, e, got));
        check(out_last == (got == e - 1), "last flag");
        fin = out_last;
        got++;
      end
      @(negedge clk);
    end
    check(got == e, "output length");
  endtask

  initial begin
    start = 0; ibil = 0; out_ready = 1; cw = '0; n_log = 5; e_len = 0; k_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 10, 40, 0);     // repetition
    run(7, 30, 100, 0);    // puncturing (30/100 <= 7/16)
    run(7, 70, 100, 0);    // shortening
    run(8, 40, 200, 1);    // puncturing, bit interleaved
    run(6, 50, 60, 1);     // shortening, bit interleaved
    run(9, 100, 700, 1);   // repetition, bit interleaved
    run(10, 500, 1500, 1);
    run(7, 49, 112, 0);    // K/E = 7/16 exactly: puncturing
    run(7, 50, 112, 1);    // just above 7/16: shortening
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
