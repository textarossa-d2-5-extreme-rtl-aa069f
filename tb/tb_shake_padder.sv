// Testbench of shake_padder: random blocks in both modes, for not-last
// blocks and for last blocks with nbytes 0, 1, random, and rate-1 (where the
// suffix and the final bit share one byte, 0x9F). The expected block is built
// as (input AND byte mask) XOR suffix XOR final bit.
module tb_shake_padder;
  import shake_pkg::*;
  logic [1343:0] block_in, block_out, exp_blk, mask;
  shake_mode_e   mode;
  logic          last;
  logic [7:0]    nbytes;
  int checks = 0, failures = 0;

  shake_padder dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      int rb;
      for (int w = 0; w < 42; w++) block_in[32*w +: 32] = $urandom;
      mode = shake_mode_e'(t % 2);
      rb   = (mode == SHAKE256) ? 136 : 168;
      last = (t % 5) != 0;
      case (t % 4)
        0: nbytes = 0;
        1: nbytes = 8'(rb - 1);
        2: nbytes = 1;
        default: nbytes = 8'($urandom_range(0, rb - 1));
      endcase
      if (!last) mask = (1344'(1) << (8 * rb)) - 1;
      else       mask = (1344'(1) << (8 * nbytes)) - 1;
      exp_blk = block_in & mask;
      if (last) begin
        exp_blk = exp_blk ^ (1344'(8'h1F) << (8 * nbytes));
        exp_blk = exp_blk ^ (1344'(8'h80) << (8 * (rb - 1)));
      end
      #1;
      checks++;
      if (block_out != exp_blk) begin
        failures++;
        if (failures < 4) $display("mismatch mode=%0d last=%0d nbytes=%0d", mode, last, nbytes);
      end
    end
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
