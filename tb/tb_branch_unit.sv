// tb_branch_unit: random operands and offsets for every branch, JAL, JR and
// HALT; checks taken, target, link (byte address of the next bundle) and
// halt against a reference.
`timescale 1ns/1ps
module tb_branch_unit;
  import slimsrp_pkg::*;
  logic en; opcode_e op; word_t a, b; logic signed [18:0] off; pc_t pc; logic [1:0] len;
  logic taken, halt; pc_t target; word_t link;
  int checks = 0, failures = 0, n_taken = 0;

  branch_unit dut (.en, .op, .a, .b, .off, .pc, .len, .taken, .target, .link, .halt);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  opcode_e ops [9] = '{OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BLTU, OP_BGEU, OP_JAL, OP_JR, OP_HALT};

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic c; pc_t et;
      op = ops[n % 9]; en = ($urandom % 6) != 0;
      a = $urandom; b = ($urandom % 4 == 0) ? a : $urandom;
      if (n % 5 == 0) b = a ^ 32'h8000_0000;
      off = 19'($urandom); pc = 30'($urandom); len = 2'(1 + $urandom % 3);
      case (op)
        OP_BEQ: c = a == b; OP_BNE: c = a != b;
        OP_BLT: c = int'(a) < int'(b); OP_BGE: c = int'(a) >= int'(b);
        OP_BLTU: c = a < b; OP_BGEU: c = a >= b;
        OP_JAL, OP_JR: c = 1; default: c = 0;
      endcase
      et = (op == OP_JR) ? pc_t'(a >> 2) : pc_t'(longint'(pc) + longint'(off));
      #1;
      checks++;
      if (taken !== (en && c) || halt !== (en && op == OP_HALT) ||
          (en && c && target !== et) || link !== word_t'((pc + pc_t'(len)) * 4)) begin
        failures++;
        $display("FAIL %s a=%h b=%h taken=%b target=%h/%h", op.name(), a, b, taken, target, et);
      end
      n_taken += taken;
    end
    checks++; if (n_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
