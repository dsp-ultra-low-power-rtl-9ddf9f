// tb_irf: random writes from the three FU ports (including several ports
// writing one entry in the same cycle) and random reads of the four
// immediate registers, compared cycle by cycle with a reference array that
// applies writes in port order; also checks that reset clears every entry.
`timescale 1ns/1ps
module tb_irf;
  localparam int NR = 3, NW = 3;
  logic clk = 0, rst_n = 0;
  logic [1:0] raddr [NR]; logic [20:0] rdata [NR];
  logic we [NW]; logic [1:0] waddr [NW]; logic [20:0] wdata [NW];
  logic [20:0] model [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  irf #(.NP(3)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NW; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int p = 0; p < NR; p++) raddr[p] = 2'(p);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) model[i] = 0;
    for (int i = 0; i < 4; i++) begin
      raddr[0] = 2'(i); #1; checks++;
      if (rdata[0] !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p] = $urandom % 2; waddr[p] = 2'($urandom); wdata[p] = 21'($urandom);
      end
      for (int p = 0; p < NR; p++) raddr[p] = 2'($urandom);
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
