// axi_lite_slave: the processor's port on the AXI system bus. A host reaches
// the data scratch-pad (through its third port, so host traffic never stalls
// the two LSUs) and a small block of control registers. One transaction is
// handled at a time; a write needs AWVALID and WVALID together and has
// priority over a read. Address map (byte addresses):
//   0x0000_0000 .. 4*SPM_WORDS-1   data scratch-pad, byte strobes honoured
//   0x8000_0000  CTRL      write bit 0 = 1: invalidate the instruction cache
//                          and start executing at START_PC
//   0x8000_0004  START_PC  byte address of the first bundle (read/write)
//   0x8000_0008  STATUS    bit 0 running, bit 1 halted since the last start
//   0x8000_000C  CYCLES    clock cycles spent running since the last start
// Timing: a write answers on B the cycle after it is accepted; a read answers
// on R two cycles after acceptance for the scratch-pad (one-cycle memory)
// and one cycle after for a register.
//
// The document shows an AXI system bus that reaches the data memory and the
// instruction cache; the AXI4-Lite subset, the address map and the control
// registers are this design's choices.
module axi_lite_slave
  import slimsrp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] awaddr,
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp,
  input  logic        arvalid,
  output logic        arready,
  input  logic [31:0] araddr,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  // scratch-pad port
  output mem_req_t    mreq,
  input  word_t       mrdata,
  // core control
  output logic        start,
  output pc_t         start_pc,
  input  logic        running,
  input  logic        halt_evt
);
  typedef enum logic [1:0] {S_IDLE, S_RWAIT, S_R, S_B} state_e;
  state_e state;
  logic   halted;
  word_t  cycles;
  logic   do_wr, do_rd;

  assign do_wr   = (state == S_IDLE) && awvalid && wvalid;
  assign do_rd   = (state == S_IDLE) && !do_wr && arvalid;
  assign awready = do_wr;
  assign wready  = do_wr;
  assign arready = do_rd;
  assign bvalid  = (state == S_B);
  assign rvalid  = (state == S_R);
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;

  always_comb begin
    mreq = '0;
    if (do_wr && !awaddr[31]) begin
      mreq.en    = 1'b1;
      mreq.we    = 1'b1;
      mreq.be    = wstrb;
      mreq.addr  = awaddr[31:2];
      mreq.wdata = wdata;
    end else if (do_rd && !araddr[31]) begin
      mreq.en   = 1'b1;
      mreq.addr = araddr[31:2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rdata    <= '0;
      start    <= 1'b0;
      start_pc <= '0;
      halted   <= 1'b0;
      cycles   <= '0;
    end else begin
      start <= 1'b0;
      if (halt_evt) halted <= 1'b1;
      if (running)  cycles <= cycles + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (do_wr) begin
            state <= S_B;
            if (awaddr[31]) begin
              unique case (awaddr[3:2])
                2'd0: if (wdata[0]) begin
                  start  <= 1'b1;
                  halted <= 1'b0;
                  cycles <= '0;
                end
                2'd1: start_pc <= wdata[PC_W+1:2];
                default: ;
              endcase
            end
          end else if (do_rd) begin
            if (araddr[31]) begin
              state <= S_R;
              unique case (araddr[3:2])
                2'd0:    rdata <= '0;
                2'd1:    rdata <= {start_pc, 2'b00};
                2'd2:    rdata <= {30'd0, halted, running};
                default: rdata <= cycles;
              endcase
            end else begin
              state <= S_RWAIT;
            end
          end
        end
        S_RWAIT: begin
          rdata <= mrdata;
          state <= S_R;
        end
        S_R: if (rready) state <= S_IDLE;
        S_B: if (bready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI rules: a response, once offered, stays until it is taken.
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid);
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid);
endmodule
