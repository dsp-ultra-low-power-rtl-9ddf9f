// tb_slimsrp_kernels: runs three signal-processing kernels of the kind used
// to benchmark this class of DSP on the whole processor at its default sizes,
// each as a compiled-style loop of compressed bundles:
//   SAD        sum of absolute differences of two 64-byte blocks (byte loads,
//              |d| = max(d, -d))
//   median-3   3-tap running median over 32 outputs (min/max network)
//   Gaussian   3-tap [1 2 1]/4 smoothing with a rounding right shift (BSHI)
// Results are read back over AXI4-Lite and compared with values computed
// here; the cycles of each loop iteration are measured against the bundle
// count (one bundle per cycle plus one bubble per taken branch).
//
// a host loads data and starts the core; the program is fetched through the
// instruction cache from a behavioural AXI memory.
`timescale 1ns/1ps
module tb_slimsrp_kernels;
  import slimsrp_pkg::*;
  import slimsrp_asm_pkg::*;

  localparam int NSAD = 64, NMED = 32, NG = 32;
  localparam logic [31:0] AA = 32'h2000, BA = 32'h2400, XA = 32'h2800, MO = 32'h2C00, GO = 32'h3000, SO = 32'h3400;
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


  int st_t [$];     // cycle of each store from FU0
  int cyc = 0, n_fault = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (fault) n_fault++;
    if (dut.mreq[0].en && dut.mreq[0].we) st_t.push_back(cyc);
  end

  initial begin
    logic [7:0]  a [NSAD], b [NSAD];
    logic [31:0] x [NMED + 2];
    logic [31:0] d, sad, med [NMED], g [NG];
    int l_sad, l_med, l_g, at;

    for (int i = 0; i < 1024; i++) pmem.mem[i] = 32'h0;
    sad = 0;
    for (int i = 0; i < NSAD; i++) begin
      a[i] = 8'($urandom); b[i] = 8'($urandom);
      sad += (a[i] > b[i]) ? 32'(a[i] - b[i]) : 32'(b[i] - a[i]);
    end
    for (int i = 0; i < NMED + 2; i++) x[i] = 32'(int'($urandom % 20001) - 10000);
    for (int i = 0; i < NMED; i++) begin
      int p, q, r, t;
      p = int'(x[i]); q = int'(x[i+1]); r = int'(x[i+2]);
      if (p > q) begin t = p; p = q; q = t; end
      if (q > r) begin t = q; q = r; r = t; end
      if (p > q) begin t = p; p = q; q = t; end
      med[i] = 32'(q);
    end
    for (int i = 0; i < NG; i++) begin
      longint s4;
      s4 = longint'(int'(x[i])) + 2 * longint'(int'(x[i+1])) + longint'(int'(x[i+2]));
      g[i] = 32'((s4 + 2) >>> 2);
    end

    // --- SAD ---
    void'(emit(setir(0, AA), setir(1, BA), setir(2, SO)));
    void'(emit(ri(OP_LDC, 1, 0, lo(AA), 1, 0), ri(OP_LDC, 2, 0, lo(BA), 1, 1), ri(OP_LDC, 3, 0, NSAD)));
    void'(emit(ri(OP_LDC, 31, 0, 0), ri(OP_LDC, 10, 0, 0), ri(OP_LDC, 11, 0, lo(SO), 1, 2)));
    l_sad = emit(ri(OP_LBU, 4, 1, 0), ri(OP_LBU, 5, 2, 0));
    void'(emit(ri(OP_ADDI, 1, 1, 1), ri(OP_ADDI, 2, 2, 1), r3(OP_SUB, 6, 4, 5)));
    void'(emit(r3(OP_SUB, 7, 31, 6), ri(OP_ADDI, 3, 3, -1)));
    void'(emit(r3(OP_MAX, 6, 6, 7)));
    at = pa; void'(emit(br(OP_BNE, 3, 31, l_sad - at), r3(OP_ADD, 10, 10, 6)));
    void'(emit(st(OP_SW, 10, 11, 0)));
    // --- median-3 ---
    void'(emit(setir(0, XA), setir(1, MO)));
    void'(emit(ri(OP_LDC, 1, 0, lo(XA), 1, 0), ri(OP_LDC, 2, 0, lo(MO), 1, 1), ri(OP_LDC, 3, 0, NMED)));
    l_med = emit(ri(OP_LW, 4, 1, 0), ri(OP_LW, 5, 1, 4));
    void'(emit(ri(OP_LW, 6, 1, 8), r3(OP_MIN, 7, 4, 5), r3(OP_MAX, 8, 4, 5)));
    void'(emit(r3(OP_MIN, 8, 8, 6), ri(OP_ADDI, 1, 1, 4), ri(OP_ADDI, 3, 3, -1)));
    void'(emit(r3(OP_MAX, 9, 7, 8)));
    void'(emit(st(OP_SW, 9, 2, 0), ri(OP_ADDI, 2, 2, 4)));
    at = pa; void'(emit(br(OP_BNE, 3, 31, l_med - at)));
    // --- Gaussian [1 2 1]/4 ---
    void'(emit(setir(0, XA), setir(1, GO)));
    void'(emit(ri(OP_LDC, 1, 0, lo(XA), 1, 0), ri(OP_LDC, 2, 0, lo(GO), 1, 1), ri(OP_LDC, 3, 0, NG)));
    l_g = emit(ri(OP_LW, 4, 1, 0), ri(OP_LW, 5, 1, 4));
    void'(emit(ri(OP_LW, 6, 1, 8), ri(OP_SLLI, 7, 5, 1), ri(OP_ADDI, 1, 1, 4)));
    void'(emit(r3(OP_ADD, 8, 4, 6), ri(OP_ADDI, 3, 3, -1)));
    void'(emit(r3(OP_ADD, 8, 8, 7)));
    void'(emit(NOP, NOP, ri(OP_BSHI, 9, 8, -2)));
    void'(emit(st(OP_SW, 9, 2, 0), ri(OP_ADDI, 2, 2, 4)));
    at = pa; void'(emit(br(OP_BNE, 3, 31, l_g - at)));
    void'(emit(halt()));
    $display("program: %0d words", pa - START_W);

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NSAD; i += 4) begin
      axil_write(AA + 32'(i), {a[i+3], a[i+2], a[i+1], a[i]});
      axil_write(BA + 32'(i), {b[i+3], b[i+2], b[i+1], b[i]});
    end
    for (int i = 0; i < NMED + 2; i++) axil_write(XA + 32'(4 * i), x[i]);
    axil_write(32'h8000_0004, 32'(START_W * 4));
    axil_write(32'h8000_0000, 32'h1);
    do axil_read(32'h8000_0008, d); while (d[1] == 1'b0);
    axil_read(32'h8000_000c, d);
    $display("all three kernels took %0d cycles", d);

    axil_read(SO, d); ck("SAD", d, sad);
    for (int i = 0; i < NMED; i++) begin axil_read(MO + 32'(4 * i), d); ck($sformatf("median[%0d]", i), d, med[i]); end
    for (int i = 0; i < NG; i++) begin axil_read(GO + 32'(4 * i), d); ck($sformatf("gauss[%0d]", i), d, g[i]); end
    // stores: 1 SAD result, NMED medians, NG Gaussian outputs, in that order.
    // Median loop: 6 bundles + 1 bubble; Gaussian loop: 7 bundles + 1 bubble.
    ck("store count", 32'(st_t.size()), 32'(1 + NMED + NG));
    for (int i = 3; i < NMED; i++) ck($sformatf("median iteration %0d", i), 32'(st_t[1+i] - st_t[i]), 32'd7);
    for (int i = 3; i < NG; i++) ck($sformatf("gauss iteration %0d", i), 32'(st_t[1+NMED+i] - st_t[NMED+i]), 32'd8);
    ck("no fault", 32'(n_fault), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
