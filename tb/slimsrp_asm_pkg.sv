// slimsrp_asm_pkg: a tiny assembler for testbenches. The encoders return the
// 30-bit operation body of one sub-instruction (layouts as in slimsrp_pkg);
// `bundle` compresses a three-slot bundle by dropping NOP slots: a dropped
// slot before a real one is expressed by the NOP-before bit (an explicit NOP
// word is emitted when two slots in a row are dropped), trailing NOPs vanish
// behind the end bit of the last word.
package slimsrp_asm_pkg;
  import slimsrp_pkg::*;

  typedef logic [29:0] body_t;
  localparam body_t NOP = '0;

  function automatic body_t r3(opcode_e op, int rd, int ra, int rb, int rc = 0, int sh = 0);
    return {op, 5'(rd), 5'(ra), 5'(rb), 5'(rc), 4'(sh)};
  endfunction
  // register-constant: short signed constant, or IRF[irx] upper bits + low 11 bits
  function automatic body_t ri(opcode_e op, int rd, int ra, int imm, int ir = 0, int irx = 0);
    return {op, 5'(rd), 5'(ra), 1'(ir), 2'(irx), 11'(imm)};
  endfunction
  function automatic body_t st(opcode_e op, int rs, int ra, int imm);
    return {op, 5'(rs), 5'(ra), 3'b000, 11'(imm)};
  endfunction
  function automatic body_t br(opcode_e op, int ra, int rb, int off);
    return {op, 5'(rb), 5'(ra), 14'(off)};
  endfunction
  function automatic body_t jal(int rd, int off);
    return {OP_JAL, 5'(rd), 19'(off)};
  endfunction
  function automatic body_t setir(int irx, logic [31:0] value);
    return {OP_SETIR, 2'(irx), 1'b0, value[31:11]};
  endfunction
  function automatic body_t halt();
    return {OP_HALT, 24'd0};
  endfunction

  // Compressed words of one bundle, returned in w[0..n-1].
  function automatic void bundle(body_t s0, body_t s1, body_t s2,
                                 output logic [31:0] w [3], output int n);
    body_t s [3];
    int pend;
    s[0] = s0; s[1] = s1; s[2] = s2;
    n = 0; pend = 0;
    for (int i = 0; i < 3; i++) w[i] = '0;
    for (int i = 0; i < 3; i++) begin
      if (s[i] == NOP) begin
        pend++;
      end else begin
        while (pend > 1) begin w[n] = {2'b00, NOP}; n++; pend--; end
        w[n] = {1'b0, 1'(pend), s[i]}; n++; pend = 0;
      end
    end
    if (n == 0) begin w[0] = {2'b00, NOP}; n = 1; end
    w[n-1][31] = 1'b1;
  endfunction
endpackage
