// tb_icache: drives random PCs into the cache, backed by a behavioural AXI
// program memory holding word(i) = hash(i). For each PC it waits for `hit`
// and checks the three window words, counts refill bursts, checks that a
// line once filled hits without a burst, that a window straddling two lines
// is filled correctly, that a miss completes within the expected time, and
// that `inv` forces refills.
`timescale 1ns/1ps
module tb_icache;
  import slimsrp_pkg::*;
  localparam int LW = 8, LINES = 16;
  logic clk = 0, rst_n = 0, inv = 0;
  pc_t pc = '0;
  word_t win [NSLOT];
  logic hit;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] araddr, rdata;
  logic [7:0] arlen; logic [2:0] arsize; logic [1:0] arburst, rresp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icache #(.LINE_WORDS(LW), .LINES(LINES)) dut (.clk, .rst_n, .inv, .pc, .win, .hit,
    .arvalid, .arready, .araddr, .arlen, .arsize, .arburst, .rvalid, .rready, .rdata, .rresp, .rlast);
  axi_rd_mem_model #(.DEPTH(4096)) mem (.clk, .arvalid, .arready, .araddr, .arlen,
    .rvalid, .rready, .rdata, .rresp, .rlast);

  function automatic word_t h(int i); return word_t'(i) * 32'h9E37_79B1 ^ 32'h5a5a_0000; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(pc_t p, output int cyc);
    pc = p;
    cyc = 0;
    #1;
    while (!hit) begin @(posedge clk); #1; cyc++; end
    for (int i = 0; i < NSLOT; i++) begin
      checks++;
      if (win[i] !== h(int'(p) + i)) begin
        failures++;
        $display("FAIL pc=%0d word %0d got %h exp %h", p, i, win[i], h(int'(p) + i));
      end
    end
  endtask

  initial begin
    int cyc, b0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = h(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // cold miss, window inside one line
    fetch(30'd0, cyc);
    checks++; if (mem.bursts != 1) begin failures++; $display("FAIL bursts %0d", mem.bursts); end
    checks++; if (cyc > 3 * LW + 10) begin failures++; $display("FAIL miss took %0d", cyc); end
    // same line again: no burst, no wait
    fetch(30'd3, cyc);
    checks++; if (cyc != 0 || mem.bursts != 1) failures++;
    // straddles lines 0 and 1: one more burst
    fetch(30'd7, cyc);
    checks++; if (mem.bursts != 2) begin failures++; $display("FAIL straddle bursts %0d", mem.bursts); end
    // conflicting line (same index, other tag) replaces line 0
    fetch(30'(LW * LINES), cyc);
    checks++; if (mem.bursts != 3) failures++;
    fetch(30'd0, cyc);
    checks++; if (mem.bursts != 4) failures++;
    // invalidate: next fetch of a resident line misses
    @(posedge clk); inv = 1; @(posedge clk); inv = 0;
    b0 = mem.bursts;
    fetch(30'd1, cyc);
    checks++; if (mem.bursts != b0 + 1) failures++;
    // random walk
    for (int n = 0; n < 400; n++) begin
      fetch(30'($urandom % 1000), cyc);
      @(posedge clk);
    end
    $display("bursts=%0d", mem.bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
