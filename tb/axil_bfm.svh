// axil_bfm.svh: AXI4-Lite master signals and tasks for one IP control bus,
// included inside a testbench module that declares clk. Writes present
// address and data together and wait for the response; reads wait for
// RVALID. RREADY and BREADY are held high.
logic [6:0]  axi_awaddr = '0, axi_araddr = '0;
logic        axi_awvalid = 1'b0, axi_wvalid = 1'b0, axi_arvalid = 1'b0;
logic        axi_awready, axi_wready, axi_bvalid, axi_arready, axi_rvalid;
logic [31:0] axi_wdata = '0, axi_rdata;
logic [1:0]  axi_bresp, axi_rresp;

task automatic axi_write(int addr, int data);
  @(negedge clk);
  axi_awaddr  = 7'(addr);
  axi_wdata   = 32'(data);
  axi_awvalid = 1'b1;
  axi_wvalid  = 1'b1;
  do @(posedge clk); while (!axi_awready);
  @(negedge clk);
  axi_awvalid = 1'b0;
  axi_wvalid  = 1'b0;
  while (!axi_bvalid) @(negedge clk);
endtask

task automatic axi_read(int addr, output int data);
  @(negedge clk);
  axi_araddr  = 7'(addr);
  axi_arvalid = 1'b1;
  do @(posedge clk); while (!axi_arready);
  @(negedge clk);
  axi_arvalid = 1'b0;
  while (!axi_rvalid) @(negedge clk);
  data = int'(axi_rdata);
endtask

// information mask (addresses 0..31) and interleaver master table (256..419)
task automatic axi_load_tables(bitvec_t mask, int pmax [164]);
  axi_write('h40, 0);
  for (int w = 0; w < 32; w++) begin
    int v;
    v = 0;
    for (int b = 0; b < 32; b++)
      if (32 * w + b < mask.size() && mask[32 * w + b]) v = v | (1 << b);
    axi_write('h44, v);
  end
  // words 32..63: parity-check mask, cleared (CA-polar)
  for (int w = 32; w < 64; w++) axi_write('h44, 0);
  axi_write('h40, 256);
  for (int m = 0; m < 164; m++) axi_write('h44, pmax[m]);
endtask

// wait until the IP reports done or idle
task automatic axi_wait_done();
  int st;
  do axi_read('h00, st); while (!st[1] && !st[2]);
endtask
