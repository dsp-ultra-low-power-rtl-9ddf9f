// tb_slimsrp_top: end-to-end test of the processor at its default sizes.
// A host (AXI4-Lite master tasks) loads samples and Q15 coefficients into
// the data scratch-pad, sets START_PC and starts the core; the program,
// assembled here into compressed bundles, sits in a behavioural AXI program
// memory that the instruction cache refills from.
//
// Program: an 8-tap FIR filter over N_OUT outputs, four dual
// multiply-adds per output with loads issued two per bundle on FU0/FU1, the
// loop addresses built as 32-bit constants through the immediate register
// file; then a block exercising the bi-directional shift (saturating left,
// rounding right), 32x32 multiplies, a JAL over a bundle that must not run,
// byte/half stores and loads, and HALT. While it runs the host reads the
// scratch-pad through the third port. Results are read back over AXI and
// compared with values computed here in plain SystemVerilog.
//
// Also checked: a loop iteration (nine bundles plus the one-cycle bubble of
// the taken branch) takes exactly 10 cycles once the cache is warm, i.e.
// every bundle issues in one cycle and load results are bypassed without a
// stall; and each mechanism (compressed bundle, NOP-before bit, cache refill,
// load bypass, taken branch, IRF constant, DMAC, both shift directions,
// concurrent bus access, halt) occurs at least once.
`timescale 1ns/1ps
module tb_slimsrp_top;
  import slimsrp_pkg::*;
  import slimsrp_asm_pkg::*;

  localparam int N_OUT = 24;
  localparam int SH    = 15;
  localparam logic [31:0] XA = 32'h2000, CA = 32'h3000, YA = 32'h4000, MA = 32'h5000;
  localparam int START_W = 16;     // program starts at byte 0x40

  logic clk = 0, rst_n = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] awaddr = 0, wdata = 0, araddr = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  logic m_arvalid, m_arready, m_rvalid, m_rready, m_rlast;
  logic [31:0] m_araddr, m_rdata;
  logic [7:0] m_arlen; logic [2:0] m_arsize; logic [1:0] m_arburst, m_rresp;
  logic running, fault;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slimsrp_top dut (
    .clk, .rst_n,
    .s_awvalid(awvalid), .s_awready(awready), .s_awaddr(awaddr),
    .s_wvalid(wvalid), .s_wready(wready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_bvalid(bvalid), .s_bready(bready), .s_bresp(bresp),
    .s_arvalid(arvalid), .s_arready(arready), .s_araddr(araddr),
    .s_rvalid(rvalid), .s_rready(rready), .s_rdata(rdata), .s_rresp(rresp),
    .m_arvalid, .m_arready, .m_araddr, .m_arlen, .m_arsize, .m_arburst,
    .m_rvalid, .m_rready, .m_rdata, .m_rresp, .m_rlast,
    .running, .fault);

  axi_rd_mem_model #(.DEPTH(1024)) pmem (.clk, .arvalid(m_arvalid), .arready(m_arready),
    .araddr(m_araddr), .arlen(m_arlen), .rvalid(m_rvalid), .rready(m_rready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast));

  `include "axil_master.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ---------------- program assembly ----------------
  int pa = START_W;
  function automatic int emit(body_t s0, body_t s1 = NOP, body_t s2 = NOP);
    logic [31:0] w [3]; int n, at;
    bundle(s0, s1, s2, w, n);
    at = pa;
    for (int i = 0; i < n; i++) begin pmem.mem[pa] = w[i]; pa++; end
    return at;
  endfunction

  function automatic int lo(logic [31:0] v); return int'(v[10:0]); endfunction

  // ---------------- reference arithmetic ----------------
  function automatic logic [31:0] ref_dmac(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    longint p;
    p = longint'(signed'(a)) * longint'(signed'(c[15:0])) + longint'(signed'(b)) * longint'(signed'(c[31:16]));
    p = (p <<< 16) >>> 16;
    return 32'(p >>> SH);
  endfunction
  function automatic logic [31:0] ref_bsh(logic [31:0] a, int amt);
    longint x;
    x = longint'(signed'(a));
    if (amt >= 0) begin
      x = x * (longint'(1) << amt);
      if (x > 64'sd2147483647) return 32'h7fff_ffff;
      if (x < -64'sd2147483648) return 32'h8000_0000;
      return 32'(x);
    end
    return 32'((x + (longint'(1) << (-amt - 1))) >>> (-amt));
  endfunction

  // ---------------- mechanism counters ----------------
  int n_bundle = 0, n_short = 0, n_full = 0, n_skip = 0, n_bypass = 0, n_taken = 0;
  int n_irfk = 0, n_dmac = 0, n_bsh_l = 0, n_bsh_r = 0, n_bus_run = 0, n_halt = 0, n_miss = 0;
  int n_fault = 0, cyc = 0;
  int y_t [$];
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (dut.ex_valid) begin
      n_bundle++;
      if (dut.ex_len < 3) n_short++;
      if (dut.ex_len == 3) n_full++;
      if (!(dut.ex_slot_v inside {3'b001, 3'b011, 3'b111})) n_skip++;
      if (|dut.byp) n_bypass++;
      for (int s = 0; s < 3; s++) begin
        if (dut.dec[s].valid && dut.dec[s].use_k && dut.dec[s].ir) n_irfk++;
        if (dut.dec[s].valid && dut.dec[s].op == OP_DMAC) n_dmac++;
        if (dut.dec[s].valid && dut.dec[s].op == OP_BSHI) begin
          if (dut.dec[s].imm[10]) n_bsh_r++; else n_bsh_l++;
        end
      end
    end
    if (dut.taken) n_taken++;
    if (dut.halt) n_halt++;
    if (fault) n_fault++;
    if (dut.mreq[2].en && running) n_bus_run++;
    if (dut.u_ic.state == 2'd1 && m_arready) n_miss++;
    if (dut.mreq[0].en && dut.mreq[0].we && dut.mreq[0].addr >= 30'(YA >> 2) &&
        dut.mreq[0].addr < 30'((YA >> 2) + N_OUT)) y_t.push_back(cyc);
  end

  initial begin
    logic [31:0] x [N_OUT + 8];
    logic [31:0] c [4];
    logic [31:0] y [N_OUT];
    logic [31:0] d, r10, r24, link;
    int loop_at, b_at, jal_at;

    for (int i = 0; i < 1024; i++) pmem.mem[i] = 32'h0;
    for (int i = 0; i < N_OUT + 8; i++) x[i] = 32'(int'($urandom % 65536) - 32768);
    for (int j = 0; j < 4; j++) c[j] = {16'($urandom % 32768), 16'(int'($urandom % 65536) - 32768)};
    for (int n = 0; n < N_OUT; n++) begin
      y[n] = 0;
      for (int j = 0; j < 4; j++) y[n] += ref_dmac(x[n + 2*j], x[n + 2*j + 1], c[j]);
    end

    // prologue: bases via the IRF, count, zero, coefficients
    void'(emit(setir(0, XA), setir(1, CA), setir(2, YA)));
    void'(emit(ri(OP_LDC, 1, 0, lo(XA), 1, 0), ri(OP_LDC, 2, 0, lo(YA), 1, 2), ri(OP_LDC, 3, 0, N_OUT)));
    void'(emit(ri(OP_LDC, 5, 0, lo(CA), 1, 1), ri(OP_LDC, 31, 0, 0)));
    void'(emit(ri(OP_LW, 20, 5, 0), ri(OP_LW, 21, 5, 4)));
    void'(emit(ri(OP_LW, 22, 5, 8), ri(OP_LW, 23, 5, 12)));
    // FIR loop
    loop_at = emit(ri(OP_LW, 4, 1, 0), ri(OP_LW, 5, 1, 4));
    void'(emit(ri(OP_LW, 6, 1, 8), ri(OP_LW, 7, 1, 12)));
    void'(emit(ri(OP_LW, 8, 1, 16), ri(OP_LW, 9, 1, 20), r3(OP_DMAC, 10, 4, 5, 20, SH)));
    void'(emit(ri(OP_LW, 11, 1, 24), ri(OP_LW, 12, 1, 28), r3(OP_DMAC, 13, 6, 7, 21, SH)));
    void'(emit(ri(OP_ADDI, 1, 1, 4), r3(OP_DMAC, 14, 8, 9, 22, SH), r3(OP_DMAC, 15, 11, 12, 23, SH)));
    void'(emit(r3(OP_ADD, 10, 10, 13), r3(OP_ADD, 14, 14, 15)));
    void'(emit(r3(OP_ADD, 10, 10, 14), ri(OP_ADDI, 3, 3, -1)));
    void'(emit(st(OP_SW, 10, 2, 0), ri(OP_ADDI, 2, 2, 4)));
    b_at = pa;
    void'(emit(br(OP_BNE, 3, 31, loop_at - b_at)));
    // shifts, multiplies, jump, byte/half access
    void'(emit(setir(3, MA)));
    void'(emit(ri(OP_LDC, 16, 0, lo(MA), 1, 3), NOP, ri(OP_BSHI, 17, 10, 3)));
    void'(emit(NOP, ri(OP_BSHI, 18, 10, -5), ri(OP_MULI, 19, 10, 12'h123, 1, 0)));
    void'(emit(setir(0, 32'h1234_5678)));
    void'(emit(ri(OP_LDC, 24, 0, lo(32'h1234_5678), 1, 0)));
    void'(emit(NOP, NOP, ri(OP_BSHI, 25, 24, 8)));
    void'(emit(NOP, r3(OP_MULH, 26, 24, 24), ri(OP_BSHI, 27, 24, -4)));
    jal_at = pa;
    void'(emit(jal(30, 2)));                       // skips the next one-word bundle
    void'(emit(ri(OP_ADDI, 28, 31, 99)));
    void'(emit(ri(OP_ADDI, 28, 31, 7)));
    void'(emit(st(OP_SW, 17, 16, 0), st(OP_SW, 18, 16, 4)));
    void'(emit(st(OP_SW, 19, 16, 8), st(OP_SW, 25, 16, 12)));
    void'(emit(st(OP_SW, 26, 16, 16), st(OP_SW, 27, 16, 20)));
    void'(emit(st(OP_SW, 28, 16, 24), st(OP_SW, 30, 16, 28)));
    void'(emit(st(OP_SB, 25, 16, 32), st(OP_SH, 24, 16, 36)));
    void'(emit(ri(OP_LB, 29, 16, 32), ri(OP_LHU, 9, 16, 36)));
    void'(emit(st(OP_SW, 29, 16, 40), st(OP_SW, 9, 16, 44)));
    void'(emit(halt()));
    $display("program: %0d words", pa - START_W);

    repeat (3) @(negedge clk);
    rst_n = 1;
    // load data through the system bus
    for (int i = 0; i < N_OUT + 8; i++) axil_write(XA + 32'(4 * i), x[i]);
    for (int j = 0; j < 4; j++) axil_write(CA + 32'(4 * j), c[j]);
    axil_write(32'h8000_0004, 32'(START_W * 4));
    axil_write(32'h8000_0000, 32'h1);
    // host traffic on the third port while the core runs
    for (int k = 0; k < 5; k++) begin
      axil_read(XA + 32'(4 * k), d);
      ck("bus read during run", d, x[k]);
    end
    do axil_read(32'h8000_0008, d); while (d[1] == 1'b0);
    ck("status after halt", d, 32'h2);
    axil_read(32'h8000_000c, d);
    $display("run took %0d cycles, %0d bundles", d, n_bundle);

    for (int n = 0; n < N_OUT; n++) begin
      axil_read(YA + 32'(4 * n), d);
      ck($sformatf("y[%0d]", n), d, y[n]);
    end
    r10 = y[N_OUT - 1];
    r24 = 32'h1234_5678;
    link = 32'((jal_at + 1) * 4);
    axil_read(MA + 0,  d); ck("bsh left 3", d, ref_bsh(r10, 3));
    axil_read(MA + 4,  d); ck("bsh right 5", d, ref_bsh(r10, -5));
    axil_read(MA + 8,  d); ck("muli irf", d, r10 * ((32'(XA) & ~32'h7ff) | 32'h123));
    axil_read(MA + 12, d); ck("bsh saturate", d, 32'h7fff_ffff);
    axil_read(MA + 16, d); ck("mulh", d, 32'((longint'(r24) * longint'(r24)) >>> 32));
    axil_read(MA + 20, d); ck("bsh right 4", d, ref_bsh(r24, -4));
    axil_read(MA + 24, d); ck("jal skipped bundle", d, 32'd7);
    axil_read(MA + 28, d); ck("jal link", d, link);
    axil_read(MA + 40, d); ck("lb sign", d, 32'hffff_ffff);
    axil_read(MA + 44, d); ck("lhu", d, 32'h0000_5678);
    axil_read(MA + 32, d); ck("sb lanes", d & 32'hff, 32'hff);

    // throughput: one bundle per cycle, one bubble per taken branch
    for (int i = 3; i < y_t.size(); i++) ck($sformatf("iteration %0d cycles", i), 32'(y_t[i] - y_t[i-1]), 32'd10);
    ck("stores seen", 32'(y_t.size()), 32'(N_OUT));

    $display("mechanisms: short=%0d full=%0d skip=%0d bypass=%0d taken=%0d irfk=%0d dmac=%0d bshl=%0d bshr=%0d bus=%0d halt=%0d miss=%0d",
             n_short, n_full, n_skip, n_bypass, n_taken, n_irfk, n_dmac, n_bsh_l, n_bsh_r, n_bus_run, n_halt, n_miss);
    ck("compressed bundle seen", 32'(n_short > 0), 1);
    ck("full bundle seen", 32'(n_full > 0), 1);
    ck("NOP-before bit seen", 32'(n_skip > 0), 1);
    ck("load bypass seen", 32'(n_bypass > 0), 1);
    ck("taken branch seen", 32'(n_taken >= N_OUT), 1);
    ck("IRF constant seen", 32'(n_irfk > 0), 1);
    ck("DMAC count", 32'(n_dmac), 32'(4 * N_OUT));
    ck("shift left seen", 32'(n_bsh_l > 0), 1);
    ck("shift right seen", 32'(n_bsh_r > 0), 1);
    ck("bus access during run", 32'(n_bus_run > 0), 1);
    ck("halt seen", 32'(n_halt), 1);
    ck("cache refill seen", 32'(n_miss > 0), 1);
    ck("no fault", 32'(n_fault), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
