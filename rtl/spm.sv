// spm: the unified data memory system, a scratch-pad memory that serves three
// 32-bit accesses per cycle: port 0 from FU0's LSU, port 1 from FU1's LSU and
// port 2 from the system bus. Each port is word addressed with byte enables.
// Reads are synchronous: data for a request accepted at one edge is on rdata
// after that edge, which gives loads their two-cycle latency. A read returns
// the word as it was before any write in the same cycle. When two ports write
// the same word in one cycle, the higher-numbered port's bytes win. Addresses
// wrap modulo the memory size.
//
// Three accesses per cycle (two FU, one bus) is the document's; the size
// (64 KiB), the true three-port array organisation and the collision rule are
// this design's choices. Contents are not initialised.
module spm
  import slimsrp_pkg::*;
#(
  parameter int WORDS = 16384,
  parameter int NP    = 3
)(
  input  logic     clk,
  input  mem_req_t req   [NP],
  output word_t    rdata [NP]
);
  localparam int AW = $clog2(WORDS);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (req[p].en) begin
        rdata[p] <= mem[req[p].addr[AW-1:0]];
        if (req[p].we)
          for (int b = 0; b < 4; b++)
            if (req[p].be[b]) mem[req[p].addr[AW-1:0]][8*b +: 8] <= req[p].wdata[8*b +: 8];
      end
    end
  end
endmodule
