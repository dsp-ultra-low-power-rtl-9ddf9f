// drf: the data register file, 32 general 32-bit registers shared by the
// three functional units. Reads are combinational (NR ports: two per FU plus
// a third for the MAC FUs' three-operand DMAC); writes take effect at the
// clock edge (NW ports: one per FU for the execute stage plus one per LSU for
// load write-back). When several ports write the same register in one cycle
// the highest-numbered port wins; the core orders load write-backs (older)
// before execute-stage writes (younger).
//
// Size (32 x 32 bits) is the document's; port counts, write priority and the
// clear-on-reset are this design's choices.
module drf
  import slimsrp_pkg::*;
#(
  parameter int N  = DRF_N,
  parameter int W  = XLEN,
  parameter int NR = 8,
  parameter int NW = 5
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] raddr [NR],
  output logic [W-1:0]         rdata [NR],
  input  logic                 we    [NW],
  input  logic [$clog2(N)-1:0] waddr [NW],
  input  logic [W-1:0]         wdata [NW]
);
  logic [W-1:0] r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p]) r[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < NR; p++) rdata[p] = r[raddr[p]];
endmodule
