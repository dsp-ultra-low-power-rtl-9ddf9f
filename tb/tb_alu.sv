// tb_alu: random and corner operands for every ALU operation in register and
// constant form, compared with a reference written with plain SystemVerilog
// operators.
`timescale 1ns/1ps
module tb_alu;
  import slimsrp_pkg::*;
  opcode_e op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_alu(opcode_e o, word_t x, word_t z);
    int sx, sz;
    sx = x; sz = z;
    case (o)
      OP_ADD, OP_ADDI: return x + z;
      OP_SUB, OP_SUBI: return x - z;
      OP_AND, OP_ANDI: return x & z;
      OP_OR,  OP_ORI:  return x | z;
      OP_XOR, OP_XORI: return x ^ z;
      OP_SLL, OP_SLLI: return x << (z % 32);
      OP_SRL, OP_SRLI: return x >> (z % 32);
      OP_SRA, OP_SRAI: return sx >>> (z % 32);
      OP_SLT, OP_SLTI: return (sx < sz) ? 1 : 0;
      OP_SLTU, OP_SLTUI: return (x < z) ? 1 : 0;
      OP_SEQ, OP_SEQI: return (x == z) ? 1 : 0;
      OP_MIN, OP_MINI: return (sx < sz) ? x : z;
      OP_MAX, OP_MAXI: return (sx > sz) ? x : z;
      OP_LDC: return z;
      default: return 0;
    endcase
  endfunction

  opcode_e ops [28] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA,
                        OP_SLT, OP_SLTU, OP_SEQ, OP_MIN, OP_MAX, OP_ADDI, OP_SUBI, OP_ANDI,
                        OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SRAI, OP_SLTI, OP_SLTUI,
                        OP_SEQI, OP_MINI, OP_MAXI, OP_LDC, OP_NOP};
  word_t corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h1f};

  initial begin
    for (int n = 0; n < 20000; n++) begin
      op = ops[n % 28];
      a = (n % 7 == 0) ? corner[$urandom % 6] : $urandom;
      b = (n % 5 == 0) ? corner[$urandom % 6] : (n % 3 == 0) ? a : $urandom;
      #1;
      checks++;
      if (y !== ref_alu(op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, ref_alu(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
