// irf: the immediate register file. Four small entries that hold the upper
// 21 bits of large constants (coefficients, global addresses). A SETIR in any
// FU writes an entry; the constant-consuming instruction that follows
// supplies the low 11 bits and names the entry, so a 32-bit constant needs two
// instructions and never occupies a data register. Reads are combinational,
// one port per FU; writes land at the clock edge, highest port winning.
//
// Four entries is the document's number; the 21-bit width follows from this
// design's 11-bit immediate field. Cleared on reset.
module irf
  import slimsrp_pkg::*;
#(
  parameter int N  = IRF_N,
  parameter int W  = IRF_W,
  parameter int NP = NSLOT
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] raddr [NP],
  output logic [W-1:0]         rdata [NP],
  input  logic                 we    [NP],
  input  logic [$clog2(N)-1:0] waddr [NP],
  input  logic [W-1:0]         wdata [NP]
);
  logic [W-1:0] r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else begin
      for (int p = 0; p < NP; p++)
        if (we[p]) r[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < NP; p++) rdata[p] = r[raddr[p]];
endmodule
