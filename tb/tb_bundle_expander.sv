// tb_bundle_expander: checks the bundle re-expansion against a reference
// that places word i at slot i + (number of NOP-omitted bits among words
// 0..i) and stops at the first end bit. Directed bundles (full, one word,
// FU1-only, FU0+FU2, FU2 via explicit NOP) are followed by random windows.
`timescale 1ns/1ps
module tb_bundle_expander;
  import slimsrp_pkg::*;
  word_t win [NSLOT];
  word_t slot [NSLOT];
  logic [NSLOT-1:0] slot_v;
  logic [1:0] len;
  logic err;
  int checks = 0, failures = 0;

  bundle_expander dut (.win, .slot, .slot_v, .len, .err);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(string tag);
    word_t e_slot [NSLOT];
    logic [NSLOT-1:0] e_v;
    int e_len, pos, nskip;
    logic e_err;
    e_v = '0; e_err = 0; e_len = 3; nskip = 0;
    for (int s = 0; s < NSLOT; s++) e_slot[s] = '0;
    for (int i = 0; i < NSLOT; i++) begin
      nskip += win[i][30];
      pos = i + nskip;
      if (pos < NSLOT) begin e_slot[pos] = win[i] & 32'h3fff_ffff; e_v[pos] = 1; end
      else e_err = 1;
      if (win[i][31]) begin e_len = i + 1; break; end
    end
    if (!win[0][31] && !win[1][31] && !win[2][31]) e_err = 1;
    #1;
    checks++;
    if (len != 2'(e_len) || slot_v != e_v || err != e_err ||
        slot[0] != e_slot[0] || slot[1] != e_slot[1] || slot[2] != e_slot[2]) begin
      failures++;
      $display("FAIL %s: win=%h %h %h len=%0d/%0d v=%b/%b err=%b/%b", tag,
               win[0], win[1], win[2], len, e_len, slot_v, e_v, err, e_err);
    end
  endtask

  initial begin
    // full bundle: three words, end on the third
    win[0] = 32'h0111_1111; win[1] = 32'h0222_2222; win[2] = 32'h8333_3333; check_one("full");
    if (len != 2'd3 || slot_v != 3'b111) failures++;
    checks++;
    // one word: FU0 only
    win[0] = 32'h8111_1111; check_one("fu0");
    if (len != 2'd1 || slot_v != 3'b001) failures++;
    checks++;
    // FU1 only: NOP omitted before it
    win[0] = 32'hC111_1111; check_one("fu1");
    if (slot_v != 3'b010 || slot[1] != 32'h0111_1111) failures++;
    checks++;
    // FU0 + FU2
    win[0] = 32'h0111_1111; win[1] = 32'hC222_2222; check_one("fu0fu2");
    if (len != 2'd2 || slot_v != 3'b101 || slot[2] != 32'h0222_2222) failures++;
    checks++;
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < NSLOT; i++) win[i] = $urandom;
      check_one("rand");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
