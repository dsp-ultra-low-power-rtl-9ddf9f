// tb_mac: random and corner operands for multiply (low, signed high,
// unsigned high), dual multiply-add with every shift amount, and the
// bi-directional shift in both directions including saturation, compared
// with a reference computed on 64-bit integers.
`timescale 1ns/1ps
module tb_mac;
  import slimsrp_pkg::*;
  opcode_e op;
  word_t a, b, c, y;
  logic [3:0] sh;
  int checks = 0, failures = 0;
  int n_sat = 0, n_rnd = 0;

  mac dut (.op, .a, .b, .c, .sh, .y);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_mac(opcode_e o, word_t x, word_t z, word_t w, int s);
    longint sx, sz, p, q, r;
    longint unsigned ux, uz;
    int amt;
    sx = longint'(signed'(x)); sz = longint'(signed'(z));
    ux = x; uz = z;
    case (o)
      OP_MUL, OP_MULI: return word_t'(sx * sz);
      OP_MULH: return word_t'((sx * sz) >>> 32);
      OP_MULHU: return word_t'((ux * uz) >> 32);
      OP_DMAC: begin
        p = sx * longint'(signed'(w[15:0]));
        q = sz * longint'(signed'(w[31:16]));
        r = p + q;
        // 48-bit wrap, then arithmetic shift
        r = (r <<< 16) >>> 16;
        return word_t'(r >>> s);
      end
      OP_BSH, OP_BSHI: begin
        amt = signed'(z);
        if (amt >= 0) begin
          if (amt > 31) amt = 31;
          r = sx * (longint'(1) << amt);
          if (r > 64'sd2147483647) begin n_sat++; return 32'h7fff_ffff; end
          if (r < -64'sd2147483648) begin n_sat++; return 32'h8000_0000; end
          return word_t'(r);
        end else begin
          amt = -amt;
          if (amt > 31) amt = 31;
          n_rnd++;
          return word_t'((sx + (longint'(1) << (amt - 1))) >>> amt);
        end
      end
      default: return 0;
    endcase
  endfunction

  opcode_e ops [7] = '{OP_MUL, OP_MULH, OP_MULHU, OP_DMAC, OP_BSH, OP_MULI, OP_BSHI};

  initial begin
    word_t e;
    for (int n = 0; n < 30000; n++) begin
      op = ops[n % 7];
      a = (n % 11 == 0) ? 32'h8000_0000 : (n % 13 == 0) ? 32'h7fff_ffff : $urandom;
      if (n % 3 == 0) a = word_t'(signed'($urandom % 4096) - 2048);
      b = $urandom;
      c = $urandom;
      sh = 4'($urandom);
      if (op inside {OP_BSH, OP_BSHI}) b = word_t'(int'($urandom % 80) - 40);
      #1;
      e = ref_mac(op, a, b, c, int'(sh));
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h c=%h sh=%0d y=%h exp=%h", op.name(), a, b, c, sh, y, e);
      end
    end
    checks++;
    if (n_sat == 0 || n_rnd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
