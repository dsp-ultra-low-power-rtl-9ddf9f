// idecode: decodes one 32-bit sub-instruction (compression bits already
// stripped) into the control fields used by a functional unit: operation,
// class, register addresses, constant fields and whether rd is written in the
// execute stage. Loads do not set wr_rd: they write back one cycle later
// through the load path. Unknown opcodes decode to a non-valid operation and
// behave as NOPs.
//
// The instruction layouts are this design's own (see slimsrp_pkg); the
// document only names the instruction decoder. Purely combinational.
module idecode
  import slimsrp_pkg::*;
(
  input  word_t inst,
  output dec_t  dec
);
  always_comb begin
    opcode_e op;
    op = opcode_e'(inst[29:24]);
    dec        = '0;
    dec.op     = op;
    dec.rd     = inst[23:19];
    dec.ra     = inst[18:14];
    dec.rb     = inst[13:9];
    dec.rc     = inst[8:4];
    dec.sh     = inst[3:0];
    dec.ir     = inst[13];
    dec.irx    = inst[12:11];
    dec.imm    = inst[10:0];
    dec.imm21  = inst[20:0];
    dec.off    = 19'(signed'(inst[13:0]));
    dec.valid  = 1'b1;
    unique case (op)
      OP_NOP: dec.valid = 1'b0;
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
      OP_SLT, OP_SLTU, OP_SEQ, OP_MIN, OP_MAX: begin
        dec.cls = CL_ALU; dec.wr_rd = 1'b1;
      end
      OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SRAI,
      OP_SLTI, OP_SLTUI, OP_SEQI, OP_MINI, OP_MAXI, OP_LDC: begin
        dec.cls = CL_ALU; dec.wr_rd = 1'b1; dec.use_k = 1'b1;
      end
      OP_SETIR: begin
        dec.cls = CL_IRF; dec.irx = inst[23:22];
      end
      OP_MUL, OP_MULH, OP_MULHU, OP_DMAC, OP_BSH: begin
        dec.cls = CL_MAC; dec.wr_rd = 1'b1;
      end
      OP_MULI, OP_BSHI: begin
        dec.cls = CL_MAC; dec.wr_rd = 1'b1; dec.use_k = 1'b1;
      end
      OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU: begin
        dec.cls = CL_LSU; dec.use_k = 1'b1;
      end
      OP_SW, OP_SH, OP_SB: begin
        dec.cls = CL_LSU; dec.use_k = 1'b1; dec.rb = inst[23:19];
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU: begin
        dec.cls = CL_CTRL; dec.rb = inst[23:19];
      end
      OP_JAL: begin
        dec.cls = CL_CTRL; dec.wr_rd = 1'b1; dec.off = signed'(inst[18:0]);
      end
      OP_JR: begin
        dec.cls = CL_CTRL; dec.wr_rd = 1'b1;
      end
      OP_HALT: dec.cls = CL_CTRL;
      default: dec.valid = 1'b0;
    endcase
  end
endmodule
