// Workload testbench of shake_accel (64-bit bus, as in crypto_top): SHAKE-256
// used as a message hash on long messages, the way post-quantum signature
// verification uses it.
//
// First the behavioural model in shake_ref_pkg is checked against the FIPS
// 202 vectors of shake_vectors.svh (messages of up to 200 bytes, for which
// its message generator gives the same bytes). Then each message of
// MSG_BYTES is streamed block by block through AXI4: a FIXED burst of 17
// words into DATA, an absorb command, STATUS polling; the 136-byte output
// block read back must equal the model's digest. The testbench reports the
// bus cycles per absorbed block and requires at most 60 of them, so the
// accelerator keeps a streaming 64-bit master busy rather than the other way
// round. 100 KiB, 500 KiB and 1 MiB are the smallest message sizes of the
// evaluation this design was built for; the larger sizes (up to 1 GiB) only
// repeat the same block loop and are not simulated.
module tb_shake_workload;
  import shake_pkg::*;
  import shake_ref_pkg::*;
  `include "shake_vectors.svh"

  // 100 KiB, 500 KiB and 1 MiB, plus a length that ends in a partial block
  localparam longint MSG_BYTES [4] = '{64'd102400, 64'd512000, 64'd1048576, 64'd10000};
  localparam int RB = 136;               // SHAKE-256 rate in bytes
  localparam int RW = RB / 8;            // 64-bit words per block

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  logic [3:0]  awid, bid, arid, rid;
  logic [11:0] awaddr, araddr;
  logic [7:0]  awlen, arlen;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid, rready;
  logic [63:0] wdata, rdata;
  logic [7:0]  wstrb;

  axi_master_bfm #(.ADDR_W(12), .DATA_W(64)) bfm (.*);
  shake_accel #(.DATA_W(64)) dut (
    .clk, .rst_n,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  // the model against the standard's values
  task automatic check_model(input int rate, input int len, input logic [63:0] exp_w [42]);
    longint unsigned out [21];
    shake_digest(rate, longint'(len), out);
    for (int w = 0; w < rate / 8; w++)
      check(out[w] == exp_w[w], $sformatf("model rate %0d len %0d word %0d", rate, len, w));
  endtask

  task automatic hash_long(input longint len);
    longint nblk = len / longint'(RB) + 1;
    longint t0;
    logic [63:0] st;
    longint unsigned ref_out [21];
    bfm.write1(12'h000, 64'(SHAKE256));
    t0 = cycles;
    for (longint b = 0; b < nblk; b++) begin
      longint nb = (b == nblk - 1) ? len - b * longint'(RB) : longint'(RB);
      for (int w = 0; w < RW; w++) begin
        logic [63:0] word = '0;
        for (int k = 0; k < 8; k++) begin
          longint pos = 64'(8 * w) + 64'(k);
          if (pos < nb) word[8*k +: 8] = msg_byte(b * longint'(RB) + pos);
        end
        bfm.wbuf[w] = word;
      end
      bfm.write_burst(12'h018, RW, 2'b00);
      bfm.write1(12'h008, {48'd0, 8'(nb), 4'd0, (b == nblk - 1), (b == 0), 2'd1});
      do bfm.read1(12'h010, st); while (st[0]);
    end
    begin
      longint per_block = (cycles - t0) / nblk;
      $display("SHAKE-256 of %0d bytes: %0d blocks, %0d cycles, %0d cycles per block",
               len, nblk, cycles - t0, per_block);
      check(per_block <= 60, $sformatf("%0d cycles per block", per_block));
    end
    check(st[1], "output block ready");
    bfm.read_burst(12'h018, RW, 2'b00);
    shake_digest(RB, longint'(len), ref_out);
    for (int w = 0; w < RW; w++)
      check(bfm.rbuf[w] == ref_out[w], $sformatf("len %0d digest word %0d", len, w));
  endtask

  initial begin
    check_model(168, 0, EXP0);
    check_model(136, 135, EXP1);
    check_model(168, 200, EXP3);
    check_model(168, 167, EXP4);
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (MSG_BYTES[i]) hash_long(MSG_BYTES[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end
endmodule
