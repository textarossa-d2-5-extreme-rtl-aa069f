// Testbench of axi4_slave with a 256-word memory behind its word port and a
// read-counter at the top address (a read with a side effect). Checks INCR
// write and read bursts with back-pressure, FIXED bursts (all beats hit one
// address, one request per beat), response ids/codes/rlast, and that a read
// returns the data of the cycle after req_re.
module tb_axi4_slave;
  localparam int AW = 10, DW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]    awid, bid, arid, rid;
  logic [AW-1:0] awaddr, araddr;
  logic [7:0]    awlen, arlen;
  logic [2:0]    awsize, arsize;
  logic [1:0]    awburst, arburst, bresp, rresp;
  logic          awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic          arvalid, arready, rlast, rvalid, rready;
  logic [DW-1:0] wdata, rdata;
  logic [3:0]    wstrb;
  logic          req_we, req_re;
  logic [AW-1:0] req_addr;
  logic [DW-1:0] req_wdata, rsp_rdata;
  logic [3:0]    req_wstrb;
  int checks = 0, failures = 0, n_we = 0, n_re = 0;

  axi_master_bfm #(.ADDR_W(AW), .DATA_W(DW)) bfm (.*);

  axi4_slave #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk, .rst_n,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .req_we, .req_re, .req_addr, .req_wdata, .req_wstrb, .rsp_rdata
  );

  // back end: memory with one-cycle read latency, counter at word 255
  logic [DW-1:0] mem [256];
  logic [DW-1:0] counter;
  always @(posedge clk) begin
    if (req_we) begin
      mem[req_addr[9:2]] <= req_wdata;
      n_we++;
    end
    if (req_re) begin
      n_re++;
      if (req_addr[9:2] == 8'hFF) begin
        rsp_rdata <= counter;
        counter   <= counter + 1;
      end else begin
        rsp_rdata <= mem[req_addr[9:2]];
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [DW-1:0] ref_mem [256];
    counter = 100; rsp_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // INCR write of 32 words at word 8, read back with back-pressure
    for (int i = 0; i < 32; i++) begin bfm.wbuf[i] = $urandom; ref_mem[8 + i] = bfm.wbuf[i]; end
    bfm.write_burst(AW'(8 * 4), 32);
    check(n_we == 32, "one write request per beat");
    bfm.stall_rready = 1;
    bfm.read_burst(AW'(8 * 4), 32);
    for (int i = 0; i < 32; i++) check(bfm.rbuf[i] == ref_mem[8 + i], $sformatf("INCR read %0d", i));
    check(n_re == 32, "one read request per beat");
    // FIXED write: all beats land on word 100, the last one stays
    for (int i = 0; i < 5; i++) bfm.wbuf[i] = 32'h1000 + i;
    bfm.write_burst(AW'(100 * 4), 5, 2'b00);
    bfm.read1(AW'(100 * 4), bfm.rbuf[0]);
    check(bfm.rbuf[0] == 32'h1004, "FIXED write keeps the address");
    check(mem[101] != 32'h1001 || ref_mem[101] == 32'h1001, "FIXED write does not spill");
    // FIXED read of the counter: consecutive values, one request per beat
    bfm.read_burst(AW'(255 * 4), 8, 2'b00);
    for (int i = 0; i < 8; i++) check(bfm.rbuf[i] == 100 + i, $sformatf("FIXED read beat %0d", i));
    // single-beat accesses
    bfm.write1(AW'(3 * 4), 32'hCAFE_F00D);
    bfm.read1(AW'(3 * 4), bfm.rbuf[0]);
    check(bfm.rbuf[0] == 32'hCAFE_F00D, "single beat");
    check(bfm.protocol_errors == 0, "ids, response codes and rlast");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
