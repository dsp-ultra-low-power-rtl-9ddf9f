// tb_ifetch: feeds the fetch stage from a behavioural instruction store
// whose words carry random compression bits, with random cache misses. A
// reference PC walks the same program: every bundle issued must carry the
// expected address, length and slots, misses must issue nothing, a taken
// branch must redirect the PC and drop the bundle behind it, halt must stop
// fetching and start must restart at the given address.
`timescale 1ns/1ps
module tb_ifetch;
  import slimsrp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, halt = 0, taken = 0;
  pc_t start_pc = '0, target = '0, pc, ex_pc;
  word_t win [NSLOT], ex_slot [NSLOT];
  logic hit, ex_valid, running, bad_bundle;
  logic [NSLOT-1:0] ex_slot_v;
  logic [1:0] ex_len;
  int checks = 0, failures = 0, n_bundles = 0, n_miss = 0, n_redirect = 0;

  always #5 clk = ~clk;

  ifetch dut (.clk, .rst_n, .start, .start_pc, .halt, .taken, .target, .pc, .win, .hit,
              .ex_valid, .ex_slot, .ex_slot_v, .ex_pc, .ex_len, .running, .bad_bundle);

  // program word at address i: an end bit roughly every other word, some skip bits
  function automatic word_t prog(pc_t i);
    logic [31:0] h;
    h = 32'(i) * 32'h9E37_79B1;
    return {h[31] | (i % 3 == 2), h[7] & h[9], 6'd1, 24'(i)};
  endfunction

  always_comb for (int i = 0; i < NSLOT; i++) win[i] = prog(pc + pc_t'(i));

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference expansion length of the bundle at p
  function automatic int blen(pc_t p);
    for (int i = 0; i < 3; i++) if (prog(p + pc_t'(i))[31]) return i + 1;
    return 3;
  endfunction

  initial begin
    pc_t rpc;
    logic expect_v;
    hit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (running || ex_valid) failures++;
    start_pc = 30'd100; start = 1; @(negedge clk); start = 0;
    rpc = 30'd100;
    checks++; if (!running || pc != 30'd100) begin failures++; $display("FAIL start"); end
    for (int n = 0; n < 3000; n++) begin
      hit = ($urandom % 4) != 0;
      taken = 0;
      expect_v = hit;
      #1;
      @(negedge clk);
      checks++;
      if (ex_valid !== expect_v) begin failures++; $display("FAIL valid n=%0d", n); end
      if (expect_v) begin
        n_bundles++;
        checks++;
        if (ex_pc != rpc || ex_len != 2'(blen(rpc)) || ex_slot[0][31:30] != 2'b00) begin
          failures++; $display("FAIL bundle pc=%0d/%0d len=%0d/%0d", ex_pc, rpc, ex_len, blen(rpc));
        end
        rpc = rpc + pc_t'(blen(rpc));
        // branch from EX now and then: the fetched bundle behind it is dropped
        if ($urandom % 8 == 0) begin
          taken = 1; target = 30'($urandom % 5000); hit = 1;
          @(negedge clk);
          taken = 0;
          checks++;
          if (ex_valid || pc != target) begin failures++; $display("FAIL redirect"); end
          rpc = target; n_redirect++;
        end
      end else n_miss++;
    end
    // halt stops fetch
    hit = 1; halt = 1; @(negedge clk); halt = 0;
    checks++; if (running || ex_valid) begin failures++; $display("FAIL halt"); end
    repeat (3) @(negedge clk);
    checks++; if (ex_valid) failures++;
    checks++; if (n_redirect == 0 || n_miss == 0 || n_bundles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
