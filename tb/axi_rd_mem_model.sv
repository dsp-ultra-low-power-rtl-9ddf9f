// axi_rd_mem_model: behavioural AXI4 read-only slave standing in for the
// external program memory on the system bus. Accepts one INCR burst at a time
// (ARREADY after a pseudo-random 0..3 cycle delay), then returns arlen+1
// beats, leaving a one-cycle gap before some of them, and holds RVALID and
// RDATA until RREADY. Words come from the `mem` array (word address = byte
// address / 4, modulo DEPTH), which the testbench fills by hierarchical
// reference. Counts bursts served.
`timescale 1ns/1ps
module axi_rd_mem_model #(
  parameter int DEPTH = 4096
)(
  input  logic        clk,
  input  logic        arvalid,
  output logic        arready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast
);
  logic [31:0] mem [DEPTH];
  int bursts = 0;
  int st = 0;          // 0 idle, 1 address wait, 2 data
  int wait_n = 0, beat = 0, nbeats = 0;
  logic [31:0] base = 0;

  assign rresp = 2'b00;
  initial begin arready = 0; rvalid = 0; rdata = 0; rlast = 0; end

  always @(posedge clk) begin
    case (st)
      0: if (arvalid) begin
           wait_n <= int'($urandom % 4);
           st     <= 1;
         end
      1: if (arready && arvalid) begin
           arready <= 0;
           base    <= araddr >> 2;
           nbeats  <= int'(arlen) + 1;
           beat    <= 0;
           bursts  <= bursts + 1;
           st      <= 2;
         end else if (wait_n == 0) begin
           arready <= 1;
         end else begin
           wait_n <= wait_n - 1;
         end
      default: begin
        if (rvalid && rready) begin
          rvalid <= 0;
          rlast  <= 0;
          if (beat == nbeats) st <= 0;
        end
        if ((!rvalid || rready) && beat < nbeats && ($urandom % 3 != 0)) begin
          rvalid <= 1;
          rdata  <= mem[(base + 32'(beat)) % DEPTH];
          rlast  <= (beat == nbeats - 1);
          beat   <= beat + 1;
          if (beat == nbeats - 1) st <= 2;
        end
      end
    endcase
  end
endmodule
