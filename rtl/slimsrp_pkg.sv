// slimsrp_pkg: types, opcodes and field layout shared by the SlimSRP-style
// three-issue VLIW DSP.
//
// Every sub-instruction is 32 bits. Bits [31:30] are the compression field
// carried by each sub-instruction: bit 31 marks the last sub-instruction of a
// bundle and bit 30 says that one NOP slot was omitted in front of this
// sub-instruction (the two-bit field and its meaning follow the description of
// the compression scheme; which bit is which is this design's choice).
// Bits [29:0] hold the operation. The opcode values and the operand layouts
// below are this design's own encoding; only the operation classes (basic ALU
// ops on every FU, 32x32 multiply, dual multiply-add and bi-directional shift
// on the two MAC FUs, loads/stores on two FUs, control on FU0, and the
// immediate-register constant form) come from the architecture description.
//
// Layouts (bits [29:24] are always the opcode):
//   R : rd[23:19] ra[18:14] rb[13:9] rc[8:4] sh[3:0]
//   I : rd[23:19] ra[18:14] ir[13] irx[12:11] imm[10:0]
//       constant = ir ? {IRF[irx], imm} : sign-extended imm
//   S : rb[23:19] (store data) ra[18:14] ir/irx/imm as in I (address offset)
//   B : rb[23:19] ra[18:14] off[13:0] (signed word offset from bundle PC)
//   J : rd[23:19] off[18:0] (JAL); JR uses rd[23:19] ra[18:14]
//   SETIR : irx[23:22] imm[20:0]   IRF[irx] <= imm (upper 21 bits of a constant)
package slimsrp_pkg;

  localparam int XLEN    = 32;
  localparam int NSLOT   = 3;    // three-issue VLIW
  localparam int DRF_N   = 32;   // DRF entries
  localparam int IRF_N   = 4;    // IRF entries
  localparam int IMM_W   = 11;   // low constant bits carried by a consumer
  localparam int IRF_W   = XLEN - IMM_W;  // upper constant bits held in the IRF
  localparam int PC_W    = 30;   // word-addressed program counter

  typedef logic [XLEN-1:0] word_t;
  typedef logic [PC_W-1:0] pc_t;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    // ALU, register-register (every FU)
    OP_ADD   = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,  OP_OR   = 6'd4,
    OP_XOR   = 6'd5,  OP_SLL  = 6'd6,  OP_SRL  = 6'd7,  OP_SRA  = 6'd8,
    OP_SLT   = 6'd9,  OP_SLTU = 6'd10, OP_SEQ  = 6'd11, OP_MIN  = 6'd12,
    OP_MAX   = 6'd13,
    // ALU, register-constant (opcode | 16)
    OP_ADDI  = 6'd17, OP_SUBI = 6'd18, OP_ANDI = 6'd19, OP_ORI  = 6'd20,
    OP_XORI  = 6'd21, OP_SLLI = 6'd22, OP_SRLI = 6'd23, OP_SRAI = 6'd24,
    OP_SLTI  = 6'd25, OP_SLTUI= 6'd26, OP_SEQI = 6'd27, OP_MINI = 6'd28,
    OP_MAXI  = 6'd29,
    OP_SETIR = 6'd30,  // IRF[irx] <= imm21
    OP_LDC   = 6'd31,  // rd <= constant
    // MAC (FU1, FU2)
    OP_MUL   = 6'd32, OP_MULH = 6'd33, OP_MULHU = 6'd34, OP_DMAC = 6'd35,
    OP_BSH   = 6'd36, OP_MULI = 6'd37, OP_BSHI  = 6'd38,
    // LSU (FU0, FU1)
    OP_LW    = 6'd40, OP_LH   = 6'd41, OP_LHU  = 6'd42, OP_LB   = 6'd43,
    OP_LBU   = 6'd44, OP_SW   = 6'd45, OP_SH   = 6'd46, OP_SB   = 6'd47,
    // Control (FU0)
    OP_BEQ   = 6'd48, OP_BNE  = 6'd49, OP_BLT  = 6'd50, OP_BGE  = 6'd51,
    OP_BLTU  = 6'd52, OP_BGEU = 6'd53, OP_JAL  = 6'd54, OP_JR   = 6'd55,
    OP_HALT  = 6'd63
  } opcode_e;

  typedef enum logic [2:0] {
    CL_NONE, CL_ALU, CL_MAC, CL_LSU, CL_CTRL, CL_IRF
  } opclass_e;

  // Decoded sub-instruction.
  typedef struct packed {
    logic                 valid;   // a real operation (not a NOP slot)
    opcode_e              op;
    opclass_e             cls;
    logic [4:0]           rd;
    logic [4:0]           ra;
    logic [4:0]           rb;
    logic [4:0]           rc;
    logic [3:0]           sh;      // DMAC right-shift amount
    logic                 use_k;   // second operand is the constant
    logic                 ir;      // constant takes its upper bits from the IRF
    logic [1:0]           irx;
    logic [IMM_W-1:0]     imm;
    logic [IRF_W-1:0]     imm21;   // SETIR payload
    logic signed [18:0]   off;     // branch/jump word offset
    logic                 wr_rd;   // writes rd in the execute stage
  } dec_t;

  // One data-memory port request (word addressed, byte enables).
  typedef struct packed {
    logic        en;
    logic        we;
    logic [3:0]  be;
    logic [29:0] addr;
    word_t       wdata;
  } mem_req_t;

  // Load that is waiting for its data in the memory stage.
  typedef struct packed {
    logic       valid;
    logic [4:0] rd;
    logic [1:0] size;   // 0 byte, 1 half, 2 word
    logic       sext;
    logic [1:0] boff;   // byte offset inside the word
  } ld_info_t;

  // Extract and extend the loaded value from a memory word.
  function automatic word_t load_format(word_t w, ld_info_t li);
    word_t sh;
    sh = w >> (8 * li.boff);
    unique case (li.size)
      2'd0:    return li.sext ? {{24{sh[7]}}, sh[7:0]}   : {24'd0, sh[7:0]};
      2'd1:    return li.sext ? {{16{sh[15]}}, sh[15:0]} : {16'd0, sh[15:0]};
      default: return w;
    endcase
  endfunction

endpackage
