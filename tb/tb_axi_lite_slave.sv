// tb_axi_lite_slave: an AXI4-Lite master writes and reads the scratch-pad
// window (with byte strobes) and the control registers. A reference memory
// with one-cycle read latency stands in for the scratch-pad port. Checks the
// data round trip, START_PC, the one-cycle start pulse, STATUS (running and
// halted) and the CYCLES counter.
`timescale 1ns/1ps
module tb_axi_lite_slave;
  import slimsrp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] awaddr = 0, wdata = 0, araddr = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  mem_req_t mreq; word_t mrdata;
  logic start, running = 0, halt_evt = 0;
  pc_t start_pc;
  word_t mem [256];
  int checks = 0, failures = 0, n_start = 0;

  always #5 clk = ~clk;

  axi_lite_slave dut (.clk, .rst_n, .awvalid, .awready, .awaddr, .wvalid, .wready, .wdata, .wstrb,
    .bvalid, .bready, .bresp, .arvalid, .arready, .araddr, .rvalid, .rready, .rdata, .rresp,
    .mreq, .mrdata, .start, .start_pc, .running, .halt_evt);

  always @(posedge clk) begin
    if (mreq.en) begin
      mrdata <= mem[mreq.addr[7:0]];
      if (mreq.we) for (int b = 0; b < 4; b++) if (mreq.be[b]) mem[mreq.addr[7:0]][8*b +: 8] <= mreq.wdata[8*b +: 8];
    end
  end

  always @(negedge clk) if (start) n_start++;

  `include "axil_master.svh"

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] ref_m [256];
    logic [31:0] d, c0;
    for (int i = 0; i < 256; i++) begin mem[i] = 0; ref_m[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int a; logic [31:0] v; logic [3:0] s;
      a = $urandom % 256; v = $urandom; s = (n % 3 == 0) ? 4'($urandom) : 4'hf;
      axil_write(32'(a * 4), v, s);
      for (int b = 0; b < 4; b++) if (s[b]) ref_m[a][8*b +: 8] = v[8*b +: 8];
      a = $urandom % 256;
      axil_read(32'(a * 4), d);
      ck($sformatf("spm read %0d", a), d == ref_m[a]);
    end
    axil_write(32'h8000_0004, 32'h0000_1230);
    axil_read(32'h8000_0004, d);
    ck("start_pc readback", d == 32'h0000_1230 && start_pc == 30'h48c);
    axil_write(32'h8000_0000, 32'h1);
    ck($sformatf("start pulse %0d", n_start), n_start == 1);
    running = 1;
    axil_read(32'h8000_0008, d);
    ck("status running", d == 32'h1);
    axil_read(32'h8000_000c, c0);
    repeat (10) @(negedge clk);
    axil_read(32'h8000_000c, d);
    ck("cycles count", d - c0 >= 10 && d - c0 < 20);
    @(negedge clk); halt_evt = 1; running = 0; @(negedge clk); halt_evt = 0;
    axil_read(32'h8000_0008, d);
    ck("status halted", d == 32'h2);
    axil_write(32'h8000_0000, 32'h1);
    axil_read(32'h8000_0008, d);
    ck("halted cleared by start", d == 32'h0 && n_start == 2);
    ck("resp okay", bresp == 0 && rresp == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
