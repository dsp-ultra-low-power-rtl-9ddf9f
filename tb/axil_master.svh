// Shared AXI4-Lite master tasks for testbenches. Expects, in the including
// module: clk and the s_* master-side signals (awvalid, awaddr, wvalid,
// wdata, wstrb, bready, arvalid, araddr, rready driven; awready, wready,
// bvalid, arready, rvalid, rdata observed).
task automatic axil_write(input logic [31:0] addr, input logic [31:0] data,
                          input logic [3:0] strb = 4'hf);
  @(negedge clk);
  awvalid = 1; awaddr = addr; wvalid = 1; wdata = data; wstrb = strb;
  do @(posedge clk); while (!(awready && wready));
  @(negedge clk);
  awvalid = 0; wvalid = 0; bready = 1;
  while (!bvalid) @(negedge clk);
  @(negedge clk);
  bready = 0;
endtask

task automatic axil_read(input logic [31:0] addr, output logic [31:0] data);
  @(negedge clk);
  arvalid = 1; araddr = addr;
  do @(posedge clk); while (!arready);
  @(negedge clk);
  arvalid = 0;
  // hold RREADY low for a cycle to exercise the response hold
  @(negedge clk);
  rready = 1;
  while (!rvalid) @(negedge clk);
  data = rdata;
  @(negedge clk);
  rready = 0;
endtask
