// tb_idecode: encodes one instruction of every layout with random fields and
// checks the decoded class, register addresses, constant fields, branch and
// jump offsets and the execute-stage write flag; unknown opcodes and NOP must
// decode as non-operations.
`timescale 1ns/1ps
module tb_idecode;
  import slimsrp_pkg::*;
  word_t inst;
  dec_t  dec;
  int checks = 0, failures = 0;

  idecode dut (.inst, .dec);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s inst=%h got %0d exp %0d", what, inst, got, exp);
    end
  endtask

  initial begin
    logic [4:0] rd, ra, rb, rc;
    logic [10:0] imm;
    for (int n = 0; n < 300; n++) begin
      rd = 5'($urandom); ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      imm = 11'($urandom);
      // R layout, ALU
      inst = {2'($urandom), 6'd1, rd, ra, rb, rc, 4'd9}; #1;
      expect_eq("add.cls", dec.cls, CL_ALU); expect_eq("add.rd", dec.rd, rd);
      expect_eq("add.ra", dec.ra, ra); expect_eq("add.rb", dec.rb, rb);
      expect_eq("add.wr", dec.wr_rd, 1); expect_eq("add.k", dec.use_k, 0);
      // DMAC
      inst = {2'b00, 6'd35, rd, ra, rb, rc, 4'd7}; #1;
      expect_eq("dmac.cls", dec.cls, CL_MAC); expect_eq("dmac.rc", dec.rc, rc);
      expect_eq("dmac.shamt", dec.sh, 7);
      // I layout with IRF
      inst = {2'b00, 6'd17, rd, ra, 1'b1, 2'd2, imm}; #1;
      expect_eq("addi.k", dec.use_k, 1); expect_eq("addi.ir", dec.ir, 1);
      expect_eq("addi.irx", dec.irx, 2); expect_eq("addi.imm", dec.imm, imm);
      // store: data register in the rd field
      inst = {2'b00, 6'd45, rd, ra, 1'b0, 2'd0, imm}; #1;
      expect_eq("sw.cls", dec.cls, CL_LSU); expect_eq("sw.rb", dec.rb, rd);
      expect_eq("sw.wr", dec.wr_rd, 0);
      // load: written back later, not in EX
      inst = {2'b00, 6'd40, rd, ra, 1'b0, 2'd0, imm}; #1;
      expect_eq("lw.wr", dec.wr_rd, 0); expect_eq("lw.rd", dec.rd, rd);
      // branch
      inst = {2'b00, 6'd49, rb, ra, 14'h3ffe}; #1;
      expect_eq("bne.cls", dec.cls, CL_CTRL); expect_eq("bne.off", dec.off, -2);
      expect_eq("bne.rb", dec.rb, rb);
      // JAL
      inst = {2'b00, 6'd54, rd, 19'h00005}; #1;
      expect_eq("jal.off", dec.off, 5); expect_eq("jal.wr", dec.wr_rd, 1);
      // SETIR
      inst = {2'b00, 6'd30, 2'd3, 1'b0, 21'h1abcd}; #1;
      expect_eq("setir.cls", dec.cls, CL_IRF); expect_eq("setir.irx", dec.irx, 3);
      expect_eq("setir.imm", dec.imm21, 21'h1abcd); expect_eq("setir.wr", dec.wr_rd, 0);
      // NOP and unknown opcodes
      inst = {2'b11, 6'd0, 24'($urandom)}; #1; expect_eq("nop.v", dec.valid, 0);
      inst = {2'b00, 6'd14, 24'($urandom)}; #1; expect_eq("u14.v", dec.valid, 0);
      inst = {2'b00, 6'd60, 24'($urandom)}; #1; expect_eq("u60.v", dec.valid, 0);
      inst = {2'b00, 6'd63, 24'($urandom)}; #1; expect_eq("halt.v", dec.valid, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
