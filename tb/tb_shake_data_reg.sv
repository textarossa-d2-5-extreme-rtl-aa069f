// Testbench of shake_data_reg (64-bit words): 21 shifted-in words must land
// with the first word in bits 63:0; 17 words (a SHAKE-256 block) must start at
// bit 256; a parallel load must come out word by word from the bottom, with
// zeros shifted in from the top.
module tb_shake_data_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          shift_in, shift_out, load;
  logic [63:0]   wdata, rdata;
  logic [1343:0] load_data, q;
  logic [63:0]   words [21];
  int checks = 0, failures = 0;

  shake_data_reg #(.DATA_W(64)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    shift_in = 0; shift_out = 0; load = 0; wdata = '0; load_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(q == '0, "reset clears");
    foreach (words[i]) words[i] = {$urandom, $urandom};
    for (int i = 0; i < 21; i++) begin
      @(negedge clk); shift_in = 1; wdata = words[i];
    end
    @(negedge clk); shift_in = 0;
    for (int i = 0; i < 21; i++) chk(q[64*i +: 64] == words[i], $sformatf("word %0d after 21 writes", i));
    for (int i = 0; i < 17; i++) begin
      @(negedge clk); shift_in = 1; wdata = words[i];
    end
    @(negedge clk); shift_in = 0;
    for (int i = 0; i < 17; i++) chk(q[256 + 64*i +: 64] == words[i], $sformatf("word %0d after 17 writes", i));
    for (int w = 0; w < 42; w++) load_data[32*w +: 32] = $urandom;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int i = 0; i < 21; i++) begin
      chk(rdata == load_data[64*i +: 64], $sformatf("read word %0d", i));
      @(negedge clk); shift_out = 1;
      @(negedge clk); shift_out = 0;
    end
    chk(q == '0, "empty after 21 reads");
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
