// fu: one functional unit of the three-issue datapath. The three FUs are
// heterogeneous and built from this module by parameters:
//   FU0: HAS_CTRL=1, HAS_LSU=1, HAS_MAC=0   (Ctrl, ALU0, LSU)
//   FU1: HAS_CTRL=0, HAS_LSU=1, HAS_MAC=1   (MAC, ALU1, LSU)
//   FU2: HAS_CTRL=0, HAS_LSU=0, HAS_MAC=1   (MAC, ALU1)
// Every FU has the ALU and can write the immediate register file (SETIR).
// The parameter defaults give an FU with every unit.
//
// The FU forms its constant operand: with the ir bit set, the upper 21 bits
// come from the selected IRF entry and the low 11 bits from the instruction,
// so a 32-bit constant costs one SETIR plus the consuming instruction; without
// it the 11-bit field is sign-extended. The second operand of ALU and MAC
// operations is either register rb or that constant.
//
// Outputs are the execute-stage register write, the IRF write, a data-memory
// request and load description (LSU), and branch/halt (Ctrl). An operation
// this FU does not support raises `illegal` and has no effect.
//
// The unit mix per FU is taken from the architecture figure; the constant
// split (21/11 bits) is this design's encoding. Combinational; the register
// files and the pipeline registers around it hold all state.
module fu
  import slimsrp_pkg::*;
#(
  parameter bit HAS_CTRL = 1'b1,
  parameter bit HAS_LSU  = 1'b1,
  parameter bit HAS_MAC  = 1'b1
)(
  input  dec_t              dec,
  input  word_t             va,      // DRF[ra]
  input  word_t             vb,      // DRF[rb]
  input  word_t             vc,      // DRF[rc]
  input  logic [IRF_W-1:0]  virf,    // IRF[irx]
  input  pc_t               pc,
  input  logic [1:0]        len,
  output logic              wb_en,
  output logic [4:0]        wb_rd,
  output word_t             wb_data,
  output logic              irf_we,
  output logic [1:0]        irf_idx,
  output logic [IRF_W-1:0]  irf_data,
  output mem_req_t          mreq,
  output ld_info_t          ld,
  output logic              taken,
  output pc_t               target,
  output logic              halt,
  output logic              illegal
);
  word_t k, opb, alu_y, mac_y, link;
  logic  ok, is_alu, is_mac, is_lsu, is_ctrl;
  logic  br_taken, br_halt;

  assign k   = dec.ir ? {virf, dec.imm} : word_t'(signed'(dec.imm));
  assign opb = dec.use_k ? k : vb;

  always_comb begin
    is_alu  = dec.valid && (dec.cls == CL_ALU);
    is_mac  = dec.valid && (dec.cls == CL_MAC)  && HAS_MAC;
    is_lsu  = dec.valid && (dec.cls == CL_LSU)  && HAS_LSU;
    is_ctrl = dec.valid && (dec.cls == CL_CTRL) && HAS_CTRL;
    ok      = is_alu || is_mac || is_lsu || is_ctrl ||
              (dec.valid && dec.cls == CL_IRF);
    illegal = dec.valid && !ok;
  end

  alu u_alu (.op(dec.op), .a(va), .b(opb), .y(alu_y));

  if (HAS_MAC) begin : g_mac
    mac u_mac (.op(dec.op), .a(va), .b(opb), .c(vc), .sh(dec.sh), .y(mac_y));
  end else begin : g_nomac
    assign mac_y = '0;
  end

  if (HAS_LSU) begin : g_lsu
    lsu u_lsu (.en(is_lsu), .op(dec.op), .rd(dec.rd), .a(va), .k(k), .sd(vb),
               .req(mreq), .ld(ld));
  end else begin : g_nolsu
    assign mreq = '0;
    assign ld   = '0;
  end

  if (HAS_CTRL) begin : g_ctrl
    branch_unit u_br (.en(is_ctrl), .op(dec.op), .a(va), .b(vb), .off(dec.off),
                      .pc(pc), .len(len), .taken(br_taken), .target(target),
                      .link(link), .halt(br_halt));
  end else begin : g_noctrl
    assign br_taken = 1'b0;
    assign br_halt  = 1'b0;
    assign target   = '0;
    assign link     = '0;
  end

  assign taken = br_taken;
  assign halt  = br_halt;

  always_comb begin
    wb_en   = dec.wr_rd && (is_alu || is_mac || is_ctrl);
    wb_rd   = dec.rd;
    wb_data = is_mac ? mac_y : is_ctrl ? link : alu_y;
  end

  assign irf_we   = dec.valid && (dec.cls == CL_IRF);
  assign irf_idx  = dec.irx;
  assign irf_data = dec.imm21;
endmodule
