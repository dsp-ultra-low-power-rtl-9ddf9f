// branch_unit: the control part (Ctrl) of FU0. Evaluates conditional
// branches (equal, not equal, signed/unsigned less-than and greater-or-equal
// between two registers), JAL (PC-relative jump with link) and JR (jump to a
// register with link), and HALT. Targets are word addresses: branch and JAL
// offsets are relative to the address of the bundle holding them. The link
// value is the address of the next bundle (bundle address plus its length in
// words, which varies because bundles are compressed).
//
// The document places a control unit in FU0 only; the branch set, offsets,
// link convention and the halt instruction are this design's choices. A taken
// branch is resolved in the execute stage; the fetch unit discards the one
// bundle fetched behind it. Combinational.
module branch_unit
  import slimsrp_pkg::*;
(
  input  logic              en,
  input  opcode_e           op,
  input  word_t             a,
  input  word_t             b,
  input  logic signed [18:0] off,
  input  pc_t               pc,      // address of this bundle
  input  logic [1:0]        len,     // its length in words
  output logic              taken,
  output pc_t               target,
  output word_t             link,
  output logic              halt
);
  always_comb begin
    logic c;
    unique case (op)
      OP_BEQ:  c = (a == b);
      OP_BNE:  c = (a != b);
      OP_BLT:  c = ($signed(a) < $signed(b));
      OP_BGE:  c = ($signed(a) >= $signed(b));
      OP_BLTU: c = (a < b);
      OP_BGEU: c = (a >= b);
      OP_JAL, OP_JR: c = 1'b1;
      default: c = 1'b0;
    endcase
    taken  = en && c;
    target = (op == OP_JR) ? a[PC_W+1:2] : pc + pc_t'(off);
    link   = word_t'({pc + pc_t'(len), 2'b00});
    halt   = en && (op == OP_HALT);
  end
endmodule
