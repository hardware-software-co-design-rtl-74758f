// tb_crc_unit: CRC generation and checking for crcLen 6, 11 and 24.
// Generation: message followed by crcLen zeros must give the CRC bits of
// the shift-register reference. Checking: the CRC-encoded block gives a
// zero remainder, and a block with one flipped bit a non-zero one.
// The cycle count from start to done must be 3*nbits + 2.
module tb_crc_unit;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  localparam int MB = KMAX + CRC_MAX;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [4:0] crc_len;
  logic [MB-1:0] blk;
  logic [10:0] nbits;
  logic [CRC_MAX-1:0] rem;
  int checks = 0, failures = 0;

  crc_unit dut (.clk(clk), .rst_n(rst_n), .start(start), .crc_len(crc_len), .blk(blk),
                .nbits(nbits), .busy(busy), .done(done), .rem(rem));

  task automatic run(int nb, output int cycles);
    @(negedge clk);
    nbits = 11'(nb);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int lens [3] = '{6, 11, 24};
    start = 0; blk = '0; nbits = 0; crc_len = 24;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int len, a, cyc;
      bitvec_t msg, crc;
      len = lens[t % 3];
      a = (t < 3) ? 20 : $urandom_range(200, 1);
      msg = new[a];
      foreach (msg[i]) msg[i] = 1'($urandom);
      crc = ref_crc(msg, len);
      crc_len = 5'(len);
      blk = '0;
      for (int i = 0; i < a; i++) blk[i] = msg[i];
      run(a + len, cyc);
      for (int i = 0; i < len; i++)
        check(rem[len - 1 - i] == crc[i], $sformatf("crc%0d bit %0d (A=%0d)", len, i, a));
      check(cyc == 3 * (a + len) + 2, $sformatf("cycles %0d expected %0d", cyc, 3 * (a + len) + 2));
      for (int i = 0; i < len; i++) blk[a + i] = crc[i];
      run(a + len, cyc);
      check(rem == '0, "check of a valid block");
      blk[$urandom_range(a - 1, 0)] ^= 1'b1;
      run(a + len, cyc);
      check(rem != '0, "check of a corrupted block");
    end
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
