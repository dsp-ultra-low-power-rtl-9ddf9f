// alu: the basic-operation unit every functional unit has (ALU0 in FU0, ALU1
// in FU1 and FU2). Add, subtract, logic, shifts, signed/unsigned compare,
// equality, min and max, in register-register and register-constant form
// (the register-constant opcode is the register form plus 16; the FU has
// already chosen the second operand). LDC passes the constant through.
//
// The document names ALU0 and ALU1 and says all FUs support basic operations
// but does not list them; this operation set, and using one ALU design for
// both names, are this design's choices. Combinational, single cycle.
module alu
  import slimsrp_pkg::*;
(
  input  opcode_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    logic [5:0] base;
    base = (op == OP_LDC) ? 6'(OP_LDC) : {op[5], 1'b0, op[3:0]};
    unique case (base)
      6'(OP_ADD):  y = a + b;
      6'(OP_SUB):  y = a - b;
      6'(OP_AND):  y = a & b;
      6'(OP_OR):   y = a | b;
      6'(OP_XOR):  y = a ^ b;
      6'(OP_SLL):  y = a << b[4:0];
      6'(OP_SRL):  y = a >> b[4:0];
      6'(OP_SRA):  y = word_t'($signed(a) >>> b[4:0]);
      6'(OP_SLT):  y = {31'd0, $signed(a) < $signed(b)};
      6'(OP_SLTU): y = {31'd0, a < b};
      6'(OP_SEQ):  y = {31'd0, a == b};
      6'(OP_MIN):  y = ($signed(a) < $signed(b)) ? a : b;
      6'(OP_MAX):  y = ($signed(a) < $signed(b)) ? b : a;
      6'(OP_LDC):  y = b;
      default:     y = '0;
    endcase
  end
endmodule
