// tb_axil_regs: AXI4-Lite register file - parameter write/read-back,
// ap_start set and cleared by the core's acknowledge, sticky ap_done
// cleared on read, table writes with auto-incrementing address, and the
// sticky error interrupt.
module tb_axil_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, arvalid, arready, rvalid;
  logic [31:0] wdata, rdata;
  logic [1:0] bresp, rresp;
  logic [31:0] param [16];
  logic ap_start, ack, done_set, idle, err_set, tbl_we, interrupt;
  logic [15:0] tbl_addr;
  logic [31:0] tbl_wdata;
  int checks = 0, failures = 0;
  int tbl_log_a [$], tbl_log_d [$];

  axil_regs dut (.clk(clk), .rst_n(rst_n), .awaddr(awaddr), .awvalid(awvalid), .awready(awready),
    .wdata(wdata), .wstrb(4'hF), .wvalid(wvalid), .wready(wready), .bresp(bresp), .bvalid(bvalid),
    .bready(1'b1), .araddr(araddr), .arvalid(arvalid), .arready(arready), .rdata(rdata),
    .rresp(rresp), .rvalid(rvalid), .rready(1'b1), .param(param), .ap_start(ap_start),
    .ap_start_ack(ack), .ap_done_set(done_set), .ap_idle(idle), .err_set(err_set),
    .tbl_we(tbl_we), .tbl_addr(tbl_addr), .tbl_wdata(tbl_wdata), .interrupt(interrupt));

  always @(posedge clk) if (tbl_we) begin
    tbl_log_a.push_back(int'(tbl_addr));
    tbl_log_d.push_back(int'(tbl_wdata));
  end

  task automatic wr(int a, int d);
    @(negedge clk);
    awaddr = 7'(a); wdata = 32'(d); awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
  endtask

  task automatic rd(int a, output int d);
    @(negedge clk);
    araddr = 7'(a); arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = int'(rdata);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int v;
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; arvalid = 0; wdata = 0;
    ack = 0; done_set = 0; idle = 1; err_set = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 1; r < 16; r++) wr(4 * r, 1000 + 7 * r);
    for (int r = 1; r < 16; r++) begin
      rd(4 * r, v);
      check(v == 1000 + 7 * r, $sformatf("param %0d read back %0d", r, v));
      check(param[r] == 32'(1000 + 7 * r), "param output");
    end
    wr(0, 1);
    check(ap_start == 1, "ap_start set");
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    check(ap_start == 0, "ap_start cleared by acknowledge");
    @(negedge clk); done_set = 1; @(negedge clk); done_set = 0; idle = 1;
    rd(0, v);
    check(v[1] == 1 && v[2] == 1, "ap_done and ap_idle reported");
    rd(0, v);
    check(v[1] == 0, "ap_done cleared on read");
    wr('h40, 256);
    wr('h44, 11); wr('h44, 22); wr('h44, 33);
    repeat (2) @(posedge clk);
    check(tbl_log_a.size() == 3, $sformatf("three table writes, saw %0d", tbl_log_a.size()));
    if (tbl_log_a.size() == 3)
      check(tbl_log_a[0] == 256 && tbl_log_a[1] == 257 && tbl_log_a[2] == 258 &&
            tbl_log_d[0] == 11 && tbl_log_d[2] == 33, "table address increments");
    @(negedge clk); err_set = 1; @(negedge clk); err_set = 0;
    check(interrupt == 1, "error interrupt set");
    rd('h48, v);
    check(v[0] == 1, "status error bit");
    wr(0, 0);
    check(interrupt == 0, "error cleared by a CTRL write");
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
