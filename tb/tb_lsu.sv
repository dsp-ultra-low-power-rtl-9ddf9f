// tb_lsu: random loads and stores of every size at random aligned addresses;
// checks the word address, write enable, byte enables, lane-replicated store
// data and the load description against a reference.
`timescale 1ns/1ps
module tb_lsu;
  import slimsrp_pkg::*;
  logic en; opcode_e op; logic [4:0] rd; word_t a, k, sd;
  mem_req_t req; ld_info_t ld;
  int checks = 0, failures = 0;

  lsu dut (.en, .op, .rd, .a, .k, .sd, .req, .ld);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  opcode_e ops [8] = '{OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU, OP_SW, OP_SH, OP_SB};

  initial begin
    for (int n = 0; n < 5000; n++) begin
      word_t addr; int sz; logic isld; logic [3:0] ebe; word_t ewd;
      op = ops[n % 8]; en = ($urandom % 8) != 0; rd = 5'($urandom);
      sz = (op inside {OP_LW, OP_SW}) ? 4 : (op inside {OP_LH, OP_LHU, OP_SH}) ? 2 : 1;
      a = $urandom; k = word_t'(signed'(11'($urandom)));
      addr = (a + k) & ~word_t'(sz - 1);
      a = addr - k;                      // keep the access aligned
      sd = $urandom;
      isld = op inside {OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU};
      ebe = (sz == 4) ? 4'hf : (sz == 2) ? (4'h3 << addr[1:0]) : (4'h1 << addr[1:0]);
      ewd = (sz == 4) ? sd : (sz == 2) ? {sd[15:0], sd[15:0]} : {4{sd[7:0]}};
      #1;
      checks++;
      if (req.en !== en || req.we !== (en && !isld) || req.addr !== addr[31:2]) begin
        failures++; $display("FAIL req %s a=%h", op.name(), addr);
      end
      if (en && !isld) begin
        checks++;
        for (int b = 0; b < 4; b++)
          if (req.be[b] !== ebe[b] || (ebe[b] && req.wdata[8*b +: 8] !== ewd[8*b +: 8])) begin
            failures++; $display("FAIL store %s a=%h be=%b", op.name(), addr, req.be); break;
          end
      end
      checks++;
      if (ld.valid !== (en && isld) ||
          (en && isld && (ld.rd !== rd || ld.boff !== addr[1:0] ||
                          ld.size !== ((sz == 4) ? 2'd2 : (sz == 2) ? 2'd1 : 2'd0) ||
                          ld.sext !== (op inside {OP_LB, OP_LH})))) begin
        failures++; $display("FAIL load %s a=%h", op.name(), addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
