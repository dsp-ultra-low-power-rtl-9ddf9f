// bundle_expander: the hardware half of the NOP-removing instruction
// compression. It receives the next three 32-bit words of the program (the
// fetch window starting at the current bundle) and rebuilds the full
// three-slot VLIW bundle.
//
// Each sub-instruction carries a two-bit compression field: bit 30 says that a
// NOP was omitted right before it, bit 31 says it ends the bundle. Walking the
// words in order, a set bit 30 advances the slot pointer by one (that slot
// receives a NOP), the word is placed in the slot the pointer names, and the
// pointer then advances; the walk stops at the first word whose bit 31 is
// set. Slots that get no word become NOPs. The number of words consumed
// (1..3) is returned so the fetch unit can advance the PC.
//
// This follows the document's description of the two bits; that one bit can
// skip only one slot (a bundle using only FU2 therefore still needs an
// explicit NOP word), the bit positions, and the handling of malformed input
// (no end bit within three words ends the bundle after three words; a word
// pushed past slot 2 is dropped) are this design's choices, flagged on `err`.
//
// Purely combinational.
module bundle_expander
  import slimsrp_pkg::*;
(
  input  word_t       win   [NSLOT],   // window: words PC, PC+1, PC+2
  output word_t       slot  [NSLOT],   // sub-instruction per FU slot, bits [31:30] cleared
  output logic [NSLOT-1:0] slot_v,     // slot holds a real sub-instruction
  output logic [1:0]  len,             // words consumed by this bundle (1..3)
  output logic        err              // malformed compression information
);
  always_comb begin
    int  p;
    logic done;
    p    = 0;
    done = 1'b0;
    len  = 2'd3;
    err  = 1'b0;
    for (int s = 0; s < NSLOT; s++) begin
      slot[s]   = '0;
      slot_v[s] = 1'b0;
    end
    for (int i = 0; i < NSLOT; i++) begin
      if (!done) begin
        if (win[i][30]) p = p + 1;
        if (p < NSLOT) begin
          slot[p]   = {2'b00, win[i][29:0]};
          slot_v[p] = 1'b1;
        end else begin
          err = 1'b1;
        end
        p = p + 1;
        if (win[i][31]) begin
          done = 1'b1;
          len  = 2'(i + 1);
        end
      end
    end
    if (!done) err = 1'b1;
  end
endmodule
