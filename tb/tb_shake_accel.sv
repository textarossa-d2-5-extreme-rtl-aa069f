// Testbench of shake_accel through AXI4, with a 64-bit and a 32-bit data bus
// instance. Messages of 0, 135, 300, 200 and 167 bytes are hashed in
// SHAKE-128 or SHAKE-256 mode: each block is written to DATA with a FIXED
// burst, absorbed with a CMD write, STATUS is polled, and two output blocks
// (one squeeze) are read from DATA and compared with FIPS 202 vectors.
// Also checks CONFIG readback, that DATA writes while busy are ignored and
// that STATUS reports the output block.
module tb_shake_accel;
  import shake_pkg::*;
  `include "shake_vectors.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // 64-bit instance ---------------------------------------------------------
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

  // 32-bit instance ---------------------------------------------------------
  logic [3:0]  awid2, bid2, arid2, rid2;
  logic [11:0] awaddr2, araddr2;
  logic [7:0]  awlen2, arlen2;
  logic [2:0]  awsize2, arsize2;
  logic [1:0]  awburst2, arburst2, bresp2, rresp2;
  logic        awvalid2, awready2, wlast2, wvalid2, wready2, bvalid2, bready2;
  logic        arvalid2, arready2, rlast2, rvalid2, rready2;
  logic [31:0] wdata2, rdata2;
  logic [3:0]  wstrb2;

  axi_master_bfm #(.ADDR_W(12), .DATA_W(32)) bfm32 (
    .clk, .awid(awid2), .awaddr(awaddr2), .awlen(awlen2), .awsize(awsize2), .awburst(awburst2),
    .awvalid(awvalid2), .awready(awready2), .wdata(wdata2), .wstrb(wstrb2), .wlast(wlast2),
    .wvalid(wvalid2), .wready(wready2), .bid(bid2), .bresp(bresp2), .bvalid(bvalid2),
    .bready(bready2), .arid(arid2), .araddr(araddr2), .arlen(arlen2), .arsize(arsize2),
    .arburst(arburst2), .arvalid(arvalid2), .arready(arready2), .rid(rid2), .rdata(rdata2),
    .rresp(rresp2), .rlast(rlast2), .rvalid(rvalid2), .rready(rready2)
  );
  shake_accel #(.DATA_W(32)) dut32 (
    .clk, .rst_n,
    .s_axi_awid(awid2), .s_axi_awaddr(awaddr2), .s_axi_awlen(awlen2), .s_axi_awsize(awsize2),
    .s_axi_awburst(awburst2), .s_axi_awvalid(awvalid2), .s_axi_awready(awready2),
    .s_axi_wdata(wdata2), .s_axi_wstrb(wstrb2), .s_axi_wlast(wlast2), .s_axi_wvalid(wvalid2),
    .s_axi_wready(wready2), .s_axi_bid(bid2), .s_axi_bresp(bresp2), .s_axi_bvalid(bvalid2),
    .s_axi_bready(bready2), .s_axi_arid(arid2), .s_axi_araddr(araddr2), .s_axi_arlen(arlen2),
    .s_axi_arsize(arsize2), .s_axi_arburst(arburst2), .s_axi_arvalid(arvalid2),
    .s_axi_arready(arready2), .s_axi_rid(rid2), .s_axi_rdata(rdata2), .s_axi_rresp(rresp2),
    .s_axi_rlast(rlast2), .s_axi_rvalid(rvalid2), .s_axi_rready(rready2)
  );

  function automatic logic [7:0] msg_byte(int i);
    return 8'((7 * i + 3) % 256);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  // 64-bit bus: register word w at byte 8*w
  task automatic hash64(input shake_mode_e m, input int len, input logic [63:0] exp_w [42]);
    int rb = (m == SHAKE256) ? 136 : 168;
    int nblk = len / rb + 1;
    logic [63:0] st;
    bfm.write1(12'h000, 64'(m));
    bfm.read1(12'h000, st);
    check(st[0] == m, "CONFIG readback");
    for (int b = 0; b < nblk; b++) begin
      int nb = (b == nblk - 1) ? len - b * rb : rb;
      for (int w = 0; w < rb / 8; w++) begin
        logic [63:0] word = '0;
        for (int k = 0; k < 8; k++)
          if (8 * w + k < nb) word[8*k +: 8] = msg_byte(b * rb + 8 * w + k);
        bfm.wbuf[w] = word;
      end
      bfm.write_burst(12'h018, rb / 8, 2'b00);
      bfm.write1(12'h008, {48'd0, 8'(nb), 4'd0, (b == nblk - 1), (b == 0), 2'd1});
      // a DATA write while the permutation runs is ignored
      bfm.write1(12'h018, 64'hFFFF_FFFF_FFFF_FFFF);
      do bfm.read1(12'h010, st); while (st[0]);
      check(st[1] == (b == nblk - 1), "STATUS output-ready flag");
    end
    bfm.stall_rready = 1;
    bfm.read_burst(12'h018, rb / 8, 2'b00);
    for (int w = 0; w < rb / 8; w++) check(bfm.rbuf[w] == exp_w[w], $sformatf("len %0d word %0d", len, w));
    bfm.write1(12'h008, 64'd2);
    do bfm.read1(12'h010, st); while (st[0]);
    check(st[1], "STATUS after squeeze");
    bfm.read_burst(12'h018, rb / 8, 2'b00);
    for (int w = 0; w < rb / 8; w++)
      check(bfm.rbuf[w] == exp_w[rb / 8 + w], $sformatf("len %0d squeezed word %0d", len, w));
    bfm.stall_rready = 0;
  endtask

  // 32-bit bus: register word w at byte 4*w
  task automatic hash32(input shake_mode_e m, input int len, input logic [63:0] exp_w [42]);
    int rb = (m == SHAKE256) ? 136 : 168;
    int nblk = len / rb + 1;
    logic [31:0] st;
    bfm32.write1(12'h000, 32'(m));
    for (int b = 0; b < nblk; b++) begin
      int nb = (b == nblk - 1) ? len - b * rb : rb;
      for (int w = 0; w < rb / 4; w++) begin
        logic [31:0] word = '0;
        for (int k = 0; k < 4; k++)
          if (4 * w + k < nb) word[8*k +: 8] = msg_byte(b * rb + 4 * w + k);
        bfm32.wbuf[w] = word;
      end
      bfm32.write_burst(12'h00C, rb / 4, 2'b00);
      bfm32.write1(12'h004, {16'd0, 8'(nb), 4'd0, (b == nblk - 1), (b == 0), 2'd1});
      do bfm32.read1(12'h008, st); while (st[0]);
    end
    bfm32.read_burst(12'h00C, rb / 4, 2'b00);
    for (int w = 0; w < rb / 4; w++)
      check(bfm32.rbuf[w] == exp_w[w / 2][32 * (w % 2) +: 32], $sformatf("32-bit len %0d word %0d", len, w));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    hash64(SHAKE128, 0,   EXP0);
    hash64(SHAKE256, 135, EXP1);
    hash64(SHAKE256, 300, EXP2);
    hash64(SHAKE128, 200, EXP3);
    hash64(SHAKE128, 167, EXP4);
    hash32(SHAKE256, 300, EXP2);
    hash32(SHAKE128, 200, EXP3);
    check(bfm.protocol_errors == 0 && bfm32.protocol_errors == 0, "AXI responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
