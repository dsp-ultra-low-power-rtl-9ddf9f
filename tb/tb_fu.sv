// tb_fu: instantiates the three FU configurations (FU0: Ctrl+ALU+LSU,
// FU1: MAC+ALU+LSU, FU2: MAC+ALU) and checks constant formation from the
// IRF and from a sign-extended short immediate, operand selection, the
// write-back mux (ALU, MAC, link), SETIR, load/store requests, branches and
// that an operation an FU lacks is flagged illegal and has no effect.
`timescale 1ns/1ps
module tb_fu;
  import slimsrp_pkg::*;
  dec_t dec;
  word_t va, vb, vc;
  logic [IRF_W-1:0] virf;
  pc_t pc; logic [1:0] len;
  logic wb_en [3]; logic [4:0] wb_rd [3]; word_t wb_data [3];
  logic irf_we [3]; logic [1:0] irf_idx [3]; logic [IRF_W-1:0] irf_data [3];
  mem_req_t mreq [3]; ld_info_t ld [3];
  logic taken [3], halt [3], illegal [3]; pc_t target [3];
  int checks = 0, failures = 0;

  fu #(.HAS_CTRL(1), .HAS_LSU(1), .HAS_MAC(0)) u0 (.dec, .va, .vb, .vc, .virf, .pc, .len,
    .wb_en(wb_en[0]), .wb_rd(wb_rd[0]), .wb_data(wb_data[0]), .irf_we(irf_we[0]), .irf_idx(irf_idx[0]),
    .irf_data(irf_data[0]), .mreq(mreq[0]), .ld(ld[0]), .taken(taken[0]), .target(target[0]),
    .halt(halt[0]), .illegal(illegal[0]));
  fu #(.HAS_CTRL(0), .HAS_LSU(1), .HAS_MAC(1)) u1 (.dec, .va, .vb, .vc, .virf, .pc, .len,
    .wb_en(wb_en[1]), .wb_rd(wb_rd[1]), .wb_data(wb_data[1]), .irf_we(irf_we[1]), .irf_idx(irf_idx[1]),
    .irf_data(irf_data[1]), .mreq(mreq[1]), .ld(ld[1]), .taken(taken[1]), .target(target[1]),
    .halt(halt[1]), .illegal(illegal[1]));
  fu #(.HAS_CTRL(0), .HAS_LSU(0), .HAS_MAC(1)) u2 (.dec, .va, .vb, .vc, .virf, .pc, .len,
    .wb_en(wb_en[2]), .wb_rd(wb_rd[2]), .wb_data(wb_data[2]), .irf_we(irf_we[2]), .irf_idx(irf_idx[2]),
    .irf_data(irf_data[2]), .mreq(mreq[2]), .ld(ld[2]), .taken(taken[2]), .target(target[2]),
    .halt(halt[2]), .illegal(illegal[2]));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dec_t mk(opcode_e op, opclass_e cls, bit wr, bit k);
    dec_t d;
    d = '0; d.valid = 1; d.op = op; d.cls = cls; d.wr_rd = wr; d.use_k = k;
    d.rd = 5'($urandom); d.ra = 5'($urandom); d.rb = 5'($urandom);
    return d;
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      va = $urandom; vb = $urandom; vc = $urandom; virf = IRF_W'($urandom);
      pc = 30'($urandom % 100000); len = 2'(1 + $urandom % 3);
      // ADDI with a 32-bit constant from the IRF
      dec = mk(OP_ADDI, CL_ALU, 1, 1); dec.ir = 1; dec.imm = 11'($urandom); #1;
      for (int f = 0; f < 3; f++)
        ck($sformatf("addi.ir fu%0d", f), wb_en[f] && wb_rd[f] == dec.rd &&
           wb_data[f] == va + {virf, dec.imm} && !illegal[f]);
      // ADDI with a short signed constant
      dec.ir = 0; #1;
      ck("addi.short", wb_data[2] == va + word_t'(signed'(dec.imm)));
      // register form
      dec = mk(OP_SUB, CL_ALU, 1, 0); #1;
      ck("sub", wb_data[0] == va - vb && wb_data[1] == va - vb);
      // MULI on the MAC FUs, illegal on FU0
      dec = mk(OP_MULI, CL_MAC, 1, 1); dec.ir = 1; dec.imm = 11'($urandom); #1;
      ck("muli fu1", wb_en[1] && wb_data[1] == va * {virf, dec.imm});
      ck("muli fu2", wb_en[2] && wb_data[2] == va * {virf, dec.imm});
      ck("muli fu0 illegal", illegal[0] && !wb_en[0]);
      // DMAC uses the third operand
      dec = mk(OP_DMAC, CL_MAC, 1, 0); dec.sh = 4'd15; #1;
      ck("dmac", wb_data[1] == word_t'(((longint'(signed'(va)) * longint'(signed'(vc[15:0]))) +
                 (longint'(signed'(vb)) * longint'(signed'(vc[31:16])))) >>> 15));
      // SETIR on every FU
      dec = mk(OP_SETIR, CL_IRF, 0, 0); dec.irx = 2'($urandom); dec.imm21 = IRF_W'($urandom); #1;
      for (int f = 0; f < 3; f++)
        ck("setir", irf_we[f] && irf_idx[f] == dec.irx && irf_data[f] == dec.imm21 && !wb_en[f]);
      // store on FU0/FU1, illegal on FU2
      dec = mk(OP_SW, CL_LSU, 0, 1); dec.imm = 11'd8; #1;
      ck("sw fu0", mreq[0].en && mreq[0].we && mreq[0].addr == 30'((va + 8) >> 2) && mreq[0].wdata == vb);
      ck("sw fu1", mreq[1].en && mreq[1].we);
      ck("sw fu2", illegal[2] && !mreq[2].en);
      // load
      dec = mk(OP_LW, CL_LSU, 0, 1); dec.imm = 11'h7fc; #1;
      ck("lw", ld[1].valid && ld[1].rd == dec.rd && !mreq[1].we && mreq[1].addr == 30'((va - 4) >> 2));
      // branch only on FU0
      dec = mk(OP_BEQ, CL_CTRL, 0, 0); dec.off = 19'sd12; vb = va; #1;
      ck("beq fu0", taken[0] && target[0] == pc + 30'd12);
      ck("beq fu1 illegal", illegal[1] && !taken[1]);
      // JAL link through the write-back mux
      dec = mk(OP_JAL, CL_CTRL, 1, 0); dec.off = -19'sd3; #1;
      ck("jal", taken[0] && wb_en[0] && wb_data[0] == word_t'((pc + pc_t'(len)) * 4) && target[0] == pc - 30'd3);
      // halt
      dec = mk(OP_HALT, CL_CTRL, 0, 0); #1;
      ck("halt", halt[0] && !halt[1] && !taken[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
