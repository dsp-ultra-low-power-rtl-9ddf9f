// icache: direct-mapped instruction cache between the fetch unit and the
// system bus. Because bundles are compressed to 1..3 words and may start at
// any word, the fetch unit asks for a three-word window starting at its PC;
// the window can straddle two lines. `hit` is raised when the lines holding
// all three words are present; otherwise the first missing line is fetched
// with one AXI4 INCR read burst of LINE_WORDS beats (32-bit beats), written
// into the data array beat by beat and marked valid on the last beat. `inv`
// clears every valid bit (used when a new program is started).
//
// Interface: word-addressed PC in, three words and hit out, combinationally;
// an AXI4 read-address/read-data master out (byte address IBASE + 4*PC).
// Timing: a hit costs no cycle; a miss costs the burst plus two cycles.
//
// The document shows an instruction cache fed from the AXI system bus and
// says compression improves its hit rate, but gives no organisation: the
// direct mapping, 8 KiB size, 32-byte lines and window lookup are this
// design's choices.
module icache
  import slimsrp_pkg::*;
#(
  parameter int          LINE_WORDS = 8,
  parameter int          LINES      = 256,
  parameter logic [31:0] IBASE      = 32'h0
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inv,
  input  pc_t         pc,
  output word_t       win [NSLOT],
  output logic        hit,
  // AXI4 read master (instruction refill)
  output logic        arvalid,
  input  logic        arready,
  output logic [31:0] araddr,
  output logic [7:0]  arlen,
  output logic [2:0]  arsize,
  output logic [1:0]  arburst,
  input  logic        rvalid,
  output logic        rready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rlast
);
  localparam int OW = $clog2(LINE_WORDS);
  localparam int IW = $clog2(LINES);
  localparam int TW = PC_W - OW - IW;

  typedef enum logic [1:0] {S_IDLE, S_AR, S_R} state_e;
  state_e state;

  logic [TW-1:0] tag_a  [LINES];
  word_t         data_a [LINES * LINE_WORDS];
  logic [LINES-1:0] valid;

  pc_t           wpc  [NSLOT];
  logic [NSLOT-1:0] whit;
  pc_t           miss_pc, fill_line;
  logic [OW-1:0] fill_cnt;

  always_comb begin
    for (int i = 0; i < NSLOT; i++) begin
      wpc[i]  = pc + pc_t'(i);
      win[i]  = data_a[wpc[i][OW+IW-1:0]];
      whit[i] = valid[wpc[i][OW+IW-1:OW]] && (tag_a[wpc[i][OW+IW-1:OW]] == wpc[i][PC_W-1:OW+IW]);
    end
    hit = &whit;
    miss_pc = !whit[0] ? wpc[0] : !whit[1] ? wpc[1] : wpc[2];
  end

  assign arvalid = (state == S_AR);
  assign araddr  = IBASE + {fill_line[PC_W-1:OW], {OW{1'b0}}, 2'b00};
  assign arlen   = 8'(LINE_WORDS - 1);
  assign arsize  = 3'd2;
  assign arburst = 2'b01;
  assign rready  = (state == S_R);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      valid     <= '0;
      fill_line <= '0;
      fill_cnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (inv) begin
          valid <= '0;
        end else if (!hit) begin
          fill_line <= miss_pc;
          fill_cnt  <= '0;
          state     <= S_AR;
        end
        S_AR: if (arready) begin
          valid[fill_line[OW+IW-1:OW]] <= 1'b0;
          state <= S_R;
        end
        S_R: if (rvalid) begin
          fill_cnt <= fill_cnt + 1'b1;
          if (rlast) begin
            valid[fill_line[OW+IW-1:OW]] <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Arrays (no reset): the tag is written when the burst starts, data per
  // beat. The replaced line is marked invalid when the burst starts. The read
  // response code is not checked.
  always_ff @(posedge clk) begin
    if (state == S_AR && arready)
      tag_a[fill_line[OW+IW-1:OW]] <= fill_line[PC_W-1:OW+IW];
    if (state == S_R && rvalid)
      data_a[{fill_line[OW+IW-1:OW], fill_cnt}] <= rdata;
  end

  // AXI rule: a raised ARVALID stays up, with a stable address, until ARREADY.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    arvalid && !arready |=> arvalid && $stable(araddr));

endmodule
