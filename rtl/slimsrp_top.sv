// slimsrp_top: a three-issue VLIW DSP core for audio and voice processing,
// with its instruction cache, three-port data scratch-pad and AXI system-bus
// port.
//
// Pipeline (three stages):
//   IF   the PC addresses the instruction cache, the three-word window is
//        expanded into a full bundle (NOPs re-inserted from the per-word
//        compression bits) and the PC advances by the 1..3 words used.
//   EX   the three sub-instructions are decoded, read the data register file
//        (DRF) and the immediate register file (IRF), and execute on FU0
//        (Ctrl, ALU, LSU), FU1 (MAC, ALU, LSU) and FU2 (MAC, ALU). Every
//        result except a load is written back at the end of this cycle, so a
//        following bundle reads it from the DRF without forwarding. A taken
//        branch or jump (FU0) replaces the PC and costs one bubble.
//   MEM  loads issued in EX receive their word from the scratch-pad, are
//        aligned and extended, and written back. A bundle that reads a
//        register loaded by the bundle just before it gets the value through
//        the load bypass, so there is no load-use stall.
// All sub-instructions of a bundle read their operands before any of them
// writes. If several write the same register, the later slot wins, and an EX
// write wins over a load write-back landing in the same cycle.
//
// Ports: an AXI4-Lite slave (host access to the scratch-pad and control
// registers, see axi_lite_slave), an AXI4 read master (instruction-cache
// refill), `running`, and `fault`, a one-cycle pulse for an operation issued
// to an FU that lacks the unit for it, or for malformed compression bits.
//
// From the document: three heterogeneous FUs with this unit mix, a 32-entry
// 32-bit DRF, a 4-entry IRF for constant generation, single-cycle execution
// except for loads, a data memory with two FU ports and one bus port, the
// compression bits, dual multiply-add and bi-directional shift. The
// instruction encoding, pipeline depth, cache and memory sizes and the
// address map are this design's.
module slimsrp_top
  import slimsrp_pkg::*;
#(
  parameter int          SPM_WORDS  = 16384,
  parameter int          LINE_WORDS = 8,
  parameter int          IC_LINES   = 256,
  parameter logic [31:0] IBASE      = 32'h0
)(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [31:0] s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // AXI4 read master, instruction refill
  output logic        m_arvalid,
  input  logic        m_arready,
  output logic [31:0] m_araddr,
  output logic [7:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  input  logic        m_rvalid,
  output logic        m_rready,
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  // status
  output logic        running,
  output logic        fault
);
  // ---------------- system bus, scratch-pad ----------------
  mem_req_t mreq  [3];
  word_t    mrdat [3];
  logic     start;
  pc_t      start_pc;
  logic     halt;

  axi_lite_slave u_bus (
    .clk, .rst_n,
    .awvalid(s_awvalid), .awready(s_awready), .awaddr(s_awaddr),
    .wvalid(s_wvalid), .wready(s_wready), .wdata(s_wdata), .wstrb(s_wstrb),
    .bvalid(s_bvalid), .bready(s_bready), .bresp(s_bresp),
    .arvalid(s_arvalid), .arready(s_arready), .araddr(s_araddr),
    .rvalid(s_rvalid), .rready(s_rready), .rdata(s_rdata), .rresp(s_rresp),
    .mreq(mreq[2]), .mrdata(mrdat[2]),
    .start, .start_pc, .running, .halt_evt(halt)
  );

  spm #(.WORDS(SPM_WORDS), .NP(3)) u_spm (.clk, .req(mreq), .rdata(mrdat));

  // ---------------- fetch ----------------
  pc_t              pc, ex_pc, target;
  word_t            win [NSLOT];
  logic             hit, ex_valid, taken, bad_bundle;
  word_t            ex_slot [NSLOT];
  logic [NSLOT-1:0] ex_slot_v;
  logic [1:0]       ex_len;

  icache #(.LINE_WORDS(LINE_WORDS), .LINES(IC_LINES), .IBASE(IBASE)) u_ic (
    .clk, .rst_n, .inv(start), .pc, .win, .hit,
    .arvalid(m_arvalid), .arready(m_arready), .araddr(m_araddr), .arlen(m_arlen),
    .arsize(m_arsize), .arburst(m_arburst), .rvalid(m_rvalid), .rready(m_rready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast)
  );

  ifetch u_if (
    .clk, .rst_n, .start, .start_pc, .halt, .taken, .target,
    .pc, .win, .hit, .ex_valid, .ex_slot, .ex_slot_v, .ex_pc, .ex_len,
    .running, .bad_bundle
  );

  // ---------------- decode ----------------
  dec_t dec [NSLOT];
  for (genvar s = 0; s < NSLOT; s++) begin : g_dec
    idecode u_dec (.inst((ex_valid && ex_slot_v[s]) ? ex_slot[s] : '0), .dec(dec[s]));
  end

  // ---------------- register files with load bypass ----------------
  localparam int NR = 8;   // FU0: ra rb; FU1: ra rb rc; FU2: ra rb rc
  localparam int NW = 5;   // load 0, load 1, EX 0, EX 1, EX 2
  logic [4:0] raddr [NR];
  word_t      rraw  [NR];
  word_t      rval  [NR];
  logic       we    [NW];
  logic [4:0] waddr [NW];
  word_t      wdata [NW];

  ld_info_t   ld_q  [2];   // loads in the memory stage (FU0, FU1 LSU)
  word_t      ld_val[2];
  logic [NR-1:0] byp;      // this read port took a bypassed load value (a status
                           // signal for observation; no logic reads it)

  assign raddr[0] = dec[0].ra; assign raddr[1] = dec[0].rb;
  assign raddr[2] = dec[1].ra; assign raddr[3] = dec[1].rb; assign raddr[4] = dec[1].rc;
  assign raddr[5] = dec[2].ra; assign raddr[6] = dec[2].rb; assign raddr[7] = dec[2].rc;

  drf #(.NR(NR), .NW(NW)) u_drf (.clk, .rst_n, .raddr, .rdata(rraw), .we, .waddr, .wdata);

  always_comb begin
    for (int l = 0; l < 2; l++) ld_val[l] = load_format(mrdat[l], ld_q[l]);
    for (int p = 0; p < NR; p++) begin
      rval[p] = rraw[p];
      byp[p]  = 1'b0;
      for (int l = 0; l < 2; l++)
        if (ld_q[l].valid && ld_q[l].rd == raddr[p]) begin
          rval[p] = ld_val[l];
          byp[p]  = 1'b1;
        end
    end
  end

  logic [1:0]       irf_ra [NSLOT];
  logic [IRF_W-1:0] irf_rv [NSLOT];
  logic             irf_we [NSLOT];
  logic [1:0]       irf_wa [NSLOT];
  logic [IRF_W-1:0] irf_wd [NSLOT];
  for (genvar s = 0; s < NSLOT; s++) begin : g_irfa
    assign irf_ra[s] = dec[s].irx;
  end
  irf u_irf (.clk, .rst_n, .raddr(irf_ra), .rdata(irf_rv), .we(irf_we), .waddr(irf_wa), .wdata(irf_wd));

  // ---------------- functional units ----------------
  logic       fu_wen [NSLOT];
  logic [4:0] fu_wrd [NSLOT];
  word_t      fu_wd  [NSLOT];
  mem_req_t   fu_mr  [NSLOT];
  ld_info_t   fu_ld  [NSLOT];
  logic       fu_tk  [NSLOT];
  pc_t        fu_tg  [NSLOT];
  logic       fu_ht  [NSLOT];
  logic [NSLOT-1:0] fu_ill;

  fu #(.HAS_CTRL(1'b1), .HAS_LSU(1'b1), .HAS_MAC(1'b0)) u_fu0 (
    .dec(dec[0]), .va(rval[0]), .vb(rval[1]), .vc('0), .virf(irf_rv[0]),
    .pc(ex_pc), .len(ex_len), .wb_en(fu_wen[0]), .wb_rd(fu_wrd[0]), .wb_data(fu_wd[0]),
    .irf_we(irf_we[0]), .irf_idx(irf_wa[0]), .irf_data(irf_wd[0]),
    .mreq(fu_mr[0]), .ld(fu_ld[0]), .taken(fu_tk[0]), .target(fu_tg[0]),
    .halt(fu_ht[0]), .illegal(fu_ill[0]));

  fu #(.HAS_CTRL(1'b0), .HAS_LSU(1'b1), .HAS_MAC(1'b1)) u_fu1 (
    .dec(dec[1]), .va(rval[2]), .vb(rval[3]), .vc(rval[4]), .virf(irf_rv[1]),
    .pc(ex_pc), .len(ex_len), .wb_en(fu_wen[1]), .wb_rd(fu_wrd[1]), .wb_data(fu_wd[1]),
    .irf_we(irf_we[1]), .irf_idx(irf_wa[1]), .irf_data(irf_wd[1]),
    .mreq(fu_mr[1]), .ld(fu_ld[1]), .taken(fu_tk[1]), .target(fu_tg[1]),
    .halt(fu_ht[1]), .illegal(fu_ill[1]));

  fu #(.HAS_CTRL(1'b0), .HAS_LSU(1'b0), .HAS_MAC(1'b1)) u_fu2 (
    .dec(dec[2]), .va(rval[5]), .vb(rval[6]), .vc(rval[7]), .virf(irf_rv[2]),
    .pc(ex_pc), .len(ex_len), .wb_en(fu_wen[2]), .wb_rd(fu_wrd[2]), .wb_data(fu_wd[2]),
    .irf_we(irf_we[2]), .irf_idx(irf_wa[2]), .irf_data(irf_wd[2]),
    .mreq(fu_mr[2]), .ld(fu_ld[2]), .taken(fu_tk[2]), .target(fu_tg[2]),
    .halt(fu_ht[2]), .illegal(fu_ill[2]));

  assign mreq[0] = fu_mr[0];
  assign mreq[1] = fu_mr[1];
  assign taken   = fu_tk[0];
  assign target  = fu_tg[0];
  assign halt    = fu_ht[0];
  assign fault   = (|fu_ill) || bad_bundle;

  // ---------------- write-back ----------------
  always_comb begin
    for (int l = 0; l < 2; l++) begin
      we[l]    = ld_q[l].valid;
      waddr[l] = ld_q[l].rd;
      wdata[l] = ld_val[l];
    end
    for (int s = 0; s < NSLOT; s++) begin
      we[2+s]    = fu_wen[s];
      waddr[2+s] = fu_wrd[s];
      wdata[2+s] = fu_wd[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_q[0] <= '0;
      ld_q[1] <= '0;
    end else begin
      ld_q[0] <= fu_ld[0];
      ld_q[1] <= fu_ld[1];
    end
  end
endmodule
