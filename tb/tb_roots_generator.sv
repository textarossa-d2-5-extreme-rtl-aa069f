// Testbench of roots_generator: for logn = 6 and logn = 3 (MAX_LOGN = 6)
// every write must put psi^i at the bit-reversed address of i, each address
// exactly once, with done 2n cycles after start.
module tb_roots_generator;
  import he_ref_pkg::*;
  localparam int ML = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, wr_en;
  logic [3:0]    logn;
  logic [31:0]   psi, q, wr_data;
  logic [63:0]   mu;
  logic [ML-1:0] wr_addr;
  int checks = 0, failures = 0, cycles = 0;

  roots_generator #(.MAX_LOGN(ML)) dut (.*);

  always @(posedge clk) cycles++;

  task automatic run(input int lg);
    int n = 1 << lg;
    int writes = 0, t0;
    bit seen [64];
    longint unsigned p = psi_for(lg);
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk);
    logn = 4'(lg); psi = 32'(p); start = 1;
    t0 = cycles;
    @(negedge clk); start = 0;
    while (!done) begin
      if (wr_en) begin
        int unsigned i;
        i = bitrev(32'(wr_addr), lg);
        checks++;
        if (int'(wr_addr) >= n || seen[wr_addr] || 64'(wr_data) != powmod(p, 64'(i), TQ)) begin
          failures++;
          $display("bad write addr=%0d data=%0d", wr_addr, wr_data);
        end
        seen[wr_addr] = 1;
        writes++;
      end
      @(negedge clk);
    end
    checks++;
    if (writes != n) begin failures++; $display("writes %0d != %0d", writes, n); end
    checks++;
    if (cycles - t0 != 2 * n) begin failures++; $display("latency %0d, expected %0d", cycles - t0, 2 * n); end
  endtask

  initial begin
    start = 0; logn = 0; psi = 0;
    q = 32'(TQ); mu = barrett_mu(TQ);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(6);
    run(3);
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
