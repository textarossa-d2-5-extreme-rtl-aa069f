// Testbench of shake_core. The testbench pads the message itself and feeds
// whole blocks: SHAKE-128 of a 200-byte message (two blocks, the first with
// "first" set) and SHAKE-256 of a 135-byte message (one block, suffix and
// final bit in the same byte). After the absorb and after one squeeze the
// truncated state must equal the FIPS 202 output; each permutation must take
// 24 cycles.
module tb_shake_core;
  import shake_pkg::*;
  `include "shake_vectors.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  shake_mode_e   mode;
  logic          absorb, first, squeeze, busy, done;
  logic [1343:0] block, trunc_out;
  int checks = 0, failures = 0, cycles = 0;

  shake_core dut (.*);
  always @(posedge clk) cycles++;

  function automatic logic [7:0] msg_byte(int i);
    return 8'((7 * i + 3) % 256);
  endfunction

  task automatic permute(input bit is_absorb, input bit is_first, input logic [1343:0] blk);
    int t0;
    @(negedge clk);
    absorb = is_absorb; squeeze = !is_absorb; first = is_first; block = blk;
    t0 = cycles;
    @(negedge clk);
    absorb = 0; squeeze = 0; first = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cycles - t0 != 24) begin failures++; $display("permutation took %0d cycles", cycles - t0); end
  endtask

  task automatic compare(input logic [63:0] exp_w [42], input int from, input int nw);
    for (int i = 0; i < nw; i++) begin
      checks++;
      if (trunc_out[64*i +: 64] != exp_w[from + i]) begin
        failures++;
        if (failures < 5) $display("word %0d: %h expected %h", from + i, trunc_out[64*i +: 64], exp_w[from + i]);
      end
    end
  endtask

  task automatic hash(input shake_mode_e m, input int len, input logic [63:0] exp_w [42]);
    int rb = (m == SHAKE256) ? 136 : 168;
    int nblk = len / rb + 1;
    mode = m;
    for (int b = 0; b < nblk; b++) begin
      logic [1343:0] blk = '0;
      for (int i = 0; i < rb; i++)
        if (b * rb + i < len) blk[8*i +: 8] = msg_byte(b * rb + i);
      if (b == nblk - 1) begin
        blk[8*(len - b * rb) +: 8] = blk[8*(len - b * rb) +: 8] ^ 8'h1F;
        blk[8*(rb - 1) +: 8]       = blk[8*(rb - 1) +: 8] ^ 8'h80;
      end
      permute(1, b == 0, blk);
    end
    compare(exp_w, 0, rb / 8);
    permute(0, 0, '0);
    compare(exp_w, rb / 8, rb / 8);
    // bits above the rate are zero
    checks++;
    if ((trunc_out >> (8 * rb)) != '0) failures++;
  endtask

  initial begin
    mode = SHAKE128; absorb = 0; first = 0; squeeze = 0; block = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    hash(SHAKE128, 200, EXP3);
    hash(SHAKE256, 135, EXP1);
    hash(SHAKE128, 0, EXP0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
