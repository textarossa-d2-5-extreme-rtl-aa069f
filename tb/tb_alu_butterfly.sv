// Testbench of alu_butterfly: a random operand stream with random gaps.
// Every result must appear exactly three cycles after its operands and equal
// U + V*r and U - V*r modulo q, computed with the % operator.
module tb_alu_butterfly;
  import he_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  logic [31:0] u, v, r, q, sum, diff;
  logic [63:0] mu;
  int checks = 0, failures = 0, cycles = 0;

  alu_butterfly dut (.*);

  // expected results indexed by the cycle they must appear in
  longint unsigned exp_s [int];
  longint unsigned exp_d [int];

  initial begin
    in_valid = 0; u = 0; v = 0; r = 0;
    q = 32'(TQ); mu = barrett_mu(TQ);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(0, 3) != 0);
      u = 32'({$urandom, $urandom} % TQ);
      v = 32'({$urandom, $urandom} % TQ);
      r = 32'({$urandom, $urandom} % TQ);
      if (i < 4) begin u = 32'(TQ - 1); v = 32'(TQ - 1); r = 32'(TQ - 1 - i); end
      if (in_valid) begin
        longint unsigned vr;
        vr = mulmod(64'(v), 64'(r), TQ);
        exp_s[cycles + 3] = (64'(u) + vr) % TQ;
        exp_d[cycles + 3] = (64'(u) + TQ - vr) % TQ;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    if (exp_s.num() != 0) begin failures++; $display("results missing: %0d", exp_s.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles counts rising edges; sample just before the next one
  always @(posedge clk) cycles++;
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (!exp_s.exists(cycles) || 64'(sum) != exp_s[cycles] || 64'(diff) != exp_d[cycles]) begin
        failures++;
        if (failures < 5) $display("bad result at cycle %0d: %0d %0d", cycles, sum, diff);
      end
      exp_s.delete(cycles); exp_d.delete(cycles);
    end else if (exp_s.exists(cycles)) begin
      failures++; exp_s.delete(cycles); exp_d.delete(cycles);
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
