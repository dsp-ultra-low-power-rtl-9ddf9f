// tb_drf: random multi-port writes (including several ports writing one
// register in the same cycle) and random reads, compared cycle by cycle with
// a reference array that applies writes in port order; also checks that
// reset clears every register.
`timescale 1ns/1ps
module tb_drf;
  localparam int NR = 8, NW = 5;
  logic clk = 0, rst_n = 0;
  logic [4:0] raddr [NR]; logic [31:0] rdata [NR];
  logic we [NW]; logic [4:0] waddr [NW]; logic [31:0] wdata [NW];
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  drf #(.NR(NR), .NW(NW)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NW; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int p = 0; p < NR; p++) raddr[p] = 5'(p);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      raddr[0] = 5'(i); #1; checks++;
      if (rdata[0] !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p] = $urandom % 2; waddr[p] = 5'($urandom % 8 + (n % 4) * 8); wdata[p] = $urandom;
      end
      for (int p = 0; p < NR; p++) raddr[p] = 5'($urandom);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++; $display("FAIL read p%0d r%0d %h/%h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
