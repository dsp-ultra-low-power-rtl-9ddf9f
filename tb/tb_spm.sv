// tb_spm: three ports issue random byte-masked writes and reads every cycle
// (the addresses confined to a small window so ports collide often);
// read data must appear one cycle later with the pre-write contents, and
// same-cycle writes to one word must resolve with the highest port winning.
// Compared against a reference array.
`timescale 1ns/1ps
module tb_spm;
  import slimsrp_pkg::*;
  localparam int WORDS = 1024;
  logic clk = 0;
  mem_req_t req [3];
  word_t rdata [3];
  word_t model [WORDS];
  word_t exp_q [3];
  logic  chk_q [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  spm #(.WORDS(WORDS)) dut (.clk, .req, .rdata);

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) begin req[p] = '0; chk_q[p] = 0; end
    // initialise through port 2
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      req[2] = '{en: 1, we: 1, be: 4'hf, addr: 30'(i), wdata: word_t'(i * 7)};
      model[i] = word_t'(i * 7);
    end
    @(negedge clk); req[2] = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        if (chk_q[p]) begin
          checks++;
          if (rdata[p] !== exp_q[p]) begin failures++; $display("FAIL port %0d %h/%h", p, rdata[p], exp_q[p]); end
        end
        req[p].en = $urandom % 4 != 0;
        req[p].we = $urandom % 2;
        req[p].be = 4'($urandom);
        req[p].addr = 30'($urandom % 16);
        req[p].wdata = $urandom;
        chk_q[p] = req[p].en;
        exp_q[p] = model[req[p].addr];
      end
      for (int p = 0; p < 3; p++)
        if (req[p].en && req[p].we)
          for (int b = 0; b < 4; b++)
            if (req[p].be[b]) model[req[p].addr][8*b +: 8] = req[p].wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
