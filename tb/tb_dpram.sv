// Testbench of dpram: random traffic on both ports against a model array,
// checking one-cycle read latency, read-first behaviour on a port that
// writes, and that each port sees the other port's writes.
module tb_dpram;
  localparam int DEPTH = 64, W = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          a_en, a_we, b_en, b_we;
  logic [5:0]    a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  dpram #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  initial begin
    logic [W-1:0] exp_a, exp_b;
    logic         chk_a, chk_b;
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // initialise through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 6'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    chk_a = 0; chk_b = 0; exp_a = '0; exp_b = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (a_rdata !== exp_a) failures++; end
      if (chk_b) begin checks++; if (b_rdata !== exp_b) failures++; end
      a_en = 1'($urandom_range(0, 1)); a_we = 1'($urandom_range(0, 1));
      b_en = 1'($urandom_range(0, 1)); b_we = 1'($urandom_range(0, 1));
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      if (a_addr == b_addr) b_we = 0;   // never two writes to one word
      a_wdata = $urandom; b_wdata = $urandom;
      chk_a = a_en; chk_b = b_en;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      // the cross-port read in the cycle of a write returns old data
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
    end
    @(negedge clk);
    if (chk_a) begin checks++; if (a_rdata !== exp_a) failures++; end
    if (chk_b) begin checks++; if (b_rdata !== exp_b) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
