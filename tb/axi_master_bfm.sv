// AXI4 master bus-functional model for the testbenches.
//
// Drives one transaction at a time. Write data come from wbuf[], read data
// land in rbuf[]; burst lengths up to 256 beats, INCR or FIXED bursts.
// rready is dropped on random cycles to exercise back-pressure when
// stall_rready is set. Counts the cycles it spends waiting for the slave.
module axi_master_bfm #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ID_W   = 4
) (
  input  logic                clk,
  output logic [ID_W-1:0]     awid,
  output logic [ADDR_W-1:0]   awaddr,
  output logic [7:0]          awlen,
  output logic [2:0]          awsize,
  output logic [1:0]          awburst,
  output logic                awvalid,
  input  logic                awready,
  output logic [DATA_W-1:0]   wdata,
  output logic [DATA_W/8-1:0] wstrb,
  output logic                wlast,
  output logic                wvalid,
  input  logic                wready,
  input  logic [ID_W-1:0]     bid,
  input  logic [1:0]          bresp,
  input  logic                bvalid,
  output logic                bready,
  output logic [ID_W-1:0]     arid,
  output logic [ADDR_W-1:0]   araddr,
  output logic [7:0]          arlen,
  output logic [2:0]          arsize,
  output logic [1:0]          arburst,
  output logic                arvalid,
  input  logic                arready,
  input  logic [ID_W-1:0]     rid,
  input  logic [DATA_W-1:0]   rdata,
  input  logic [1:0]          rresp,
  input  logic                rlast,
  input  logic                rvalid,
  output logic                rready
);

  logic [DATA_W-1:0] wbuf [256];
  logic [DATA_W-1:0] rbuf [256];
  int unsigned       protocol_errors = 0;
  bit                stall_rready = 1'b0;
  logic [ID_W-1:0]   next_id = '0;

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awid = '0; awaddr = '0; awlen = '0; awsize = '0; awburst = '0;
    wdata = '0; wstrb = '0; wlast = 0;
    arid = '0; araddr = '0; arlen = '0; arsize = '0; arburst = '0;
  end

  localparam logic [2:0] SIZE = 3'($clog2(DATA_W/8));

  // All signals change on the falling edge, and a handshake is recognised
  // from valid and ready seen there, so it completes at the next rising edge.
  task automatic write_burst(input logic [ADDR_W-1:0] addr, input int unsigned beats,
                             input logic [1:0] burst = 2'b01);
    logic [ID_W-1:0] id = next_id;
    next_id = next_id + 1;
    @(negedge clk);
    awid = id; awaddr = addr; awlen = 8'(beats - 1); awsize = SIZE;
    awburst = burst; awvalid = 1;
    #0;
    while (!awready) @(negedge clk);
    @(negedge clk);
    awvalid = 0;
    for (int i = 0; i < int'(beats); i++) begin
      wdata = wbuf[i]; wstrb = '1; wlast = (i == int'(beats) - 1); wvalid = 1;
      #0;
      while (!wready) @(negedge clk);
      @(negedge clk);
    end
    wvalid = 0; wlast = 0;
    bready = 1;
    #0;
    while (!bvalid) @(negedge clk);
    if (bid != id || bresp != 2'b00) protocol_errors++;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic read_burst(input logic [ADDR_W-1:0] addr, input int unsigned beats,
                            input logic [1:0] burst = 2'b01);
    logic [ID_W-1:0] id = next_id;
    int unsigned got = 0;
    next_id = next_id + 1;
    @(negedge clk);
    arid = id; araddr = addr; arlen = 8'(beats - 1); arsize = SIZE;
    arburst = burst; arvalid = 1;
    #0;
    while (!arready) @(negedge clk);
    @(negedge clk);
    arvalid = 0;
    while (got < beats) begin
      rready = stall_rready ? 1'($urandom_range(0, 1)) : 1'b1;
      #0;
      if (rvalid && rready) begin
        rbuf[got] = rdata;
        if (rid != id || rresp != 2'b00 || rlast != (got == beats - 1)) protocol_errors++;
        got++;
      end
      @(negedge clk);
    end
    rready = 0;
  endtask

  task automatic write1(input logic [ADDR_W-1:0] addr, input logic [DATA_W-1:0] d);
    wbuf[0] = d;
    write_burst(addr, 1);
  endtask

  task automatic read1(input logic [ADDR_W-1:0] addr, output logic [DATA_W-1:0] d);
    read_burst(addr, 1);
    d = rbuf[0];
  endtask

endmodule
