// ifetch: instruction fetch stage. Holds the PC (a word address), presents it
// to the instruction cache, expands the returned three-word window into a
// full bundle with bundle_expander and advances the PC by the number of words
// the bundle really occupied (1..3). The expanded bundle, its address and its
// length are registered for the execute stage.
//
// Control, in priority order each cycle:
//   start            PC <= start_pc, running, pipeline register emptied
//   halt (from EX)   stop fetching, pipeline register emptied
//   taken (from EX)  PC <= target, the bundle fetched behind the branch is
//                    discarded (one bubble)
//   cache hit        register the bundle, PC <= PC + len
//   cache miss       insert a bubble and wait for the refill
// The pipeline shape (fetch/expand, execute, load write-back) and these
// rules are this design's; the document names the fetch and decode stages and
// places NOP re-insertion in the hardware decoder.
module ifetch
  import slimsrp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  pc_t              start_pc,
  input  logic             halt,
  input  logic             taken,
  input  pc_t              target,
  // instruction cache
  output pc_t              pc,
  input  word_t            win [NSLOT],
  input  logic             hit,
  // to execute
  output logic             ex_valid,
  output word_t            ex_slot [NSLOT],
  output logic [NSLOT-1:0] ex_slot_v,
  output pc_t              ex_pc,
  output logic [1:0]       ex_len,
  output logic             running,
  output logic             bad_bundle     // a bundle with malformed compression bits was issued
);
  word_t            slot [NSLOT];
  logic [NSLOT-1:0] slot_v;
  logic [1:0]       len;
  logic             err;

  bundle_expander u_exp (.win(win), .slot(slot), .slot_v(slot_v), .len(len), .err(err));

  assign bad_bundle = running && hit && err && !start && !halt && !taken;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      running   <= 1'b0;
      ex_valid  <= 1'b0;
      ex_pc     <= '0;
      ex_len    <= '0;
      ex_slot_v <= '0;
      for (int i = 0; i < NSLOT; i++) ex_slot[i] <= '0;
    end else begin
      ex_valid <= 1'b0;
      if (start) begin
        pc      <= start_pc;
        running <= 1'b1;
      end else if (halt) begin
        running <= 1'b0;
      end else if (taken) begin
        pc <= target;
      end else if (running && hit) begin
        ex_valid  <= 1'b1;
        ex_slot   <= slot;
        ex_slot_v <= slot_v;
        ex_pc     <= pc;
        ex_len    <= len;
        pc        <= pc + pc_t'(len);
      end
    end
  end
endmodule
