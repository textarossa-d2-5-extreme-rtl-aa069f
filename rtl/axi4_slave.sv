// AXI4 memory-mapped slave front end.
//
// Turns AXI4 transactions into a simple word-access port for the register
// file and memories behind it:
//   write beat:  req_we high for one cycle with req_addr / req_wdata / req_wstrb
//   read beat:   req_re high for one cycle with req_addr; the back end returns
//                rsp_rdata on the next clock edge (fixed one-cycle latency)
// INCR bursts step the address by the beat size, FIXED bursts keep it
// (useful for a data port that behaves like a FIFO), WRAP is treated as INCR.
// One transaction is handled at a time; a pending write address is served
// before a pending read address. Every read beat issues exactly one req_re,
// so reads with side effects are safe. Responses are always OKAY.
// Timing: a write burst of L beats takes L+2 cycles with wvalid held high;
// each read beat takes three cycles plus any rready back-pressure.
// The description asks for a standard AXI4 memory-mapped slave with 32-bit
// data and 18-bit address (HE) or a 32/64-bit data bus (SHAKE); the internal
// port and the one-transaction-at-a-time scheme are this design's choices.
module axi4_slave #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ID_W   = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // write address channel
  input  logic [ID_W-1:0]     s_axi_awid,
  input  logic [ADDR_W-1:0]   s_axi_awaddr,
  input  logic [7:0]          s_axi_awlen,
  input  logic [2:0]          s_axi_awsize,
  input  logic [1:0]          s_axi_awburst,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  // write data channel
  input  logic [DATA_W-1:0]   s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic                s_axi_wlast,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  // write response channel
  output logic [ID_W-1:0]     s_axi_bid,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  // read address channel
  input  logic [ID_W-1:0]     s_axi_arid,
  input  logic [ADDR_W-1:0]   s_axi_araddr,
  input  logic [7:0]          s_axi_arlen,
  input  logic [2:0]          s_axi_arsize,
  input  logic [1:0]          s_axi_arburst,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  // read data channel
  output logic [ID_W-1:0]     s_axi_rid,
  output logic [DATA_W-1:0]   s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rlast,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // back-end word port
  output logic                req_we,
  output logic                req_re,
  output logic [ADDR_W-1:0]   req_addr,
  output logic [DATA_W-1:0]   req_wdata,
  output logic [DATA_W/8-1:0] req_wstrb,
  input  logic [DATA_W-1:0]   rsp_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_WDATA, S_BRESP, S_RREQ, S_RWAIT, S_RDATA} sstate_e;

  localparam logic [1:0] BURST_FIXED = 2'b00;

  sstate_e         st;
  logic [ADDR_W-1:0] addr;
  logic [7:0]      beats_left;
  logic [2:0]      size;
  logic [1:0]      burst;
  logic [ID_W-1:0] id;

  logic [ADDR_W-1:0] addr_next;
  assign addr_next = (burst == BURST_FIXED) ? addr : addr + (ADDR_W'(1) << size);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      addr        <= '0;
      beats_left  <= '0;
      size        <= '0;
      burst       <= '0;
      id          <= '0;
      s_axi_rdata <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (s_axi_awvalid) begin
            st         <= S_WDATA;
            addr       <= s_axi_awaddr;
            beats_left <= s_axi_awlen;
            size       <= s_axi_awsize;
            burst      <= s_axi_awburst;
            id         <= s_axi_awid;
          end else if (s_axi_arvalid) begin
            st         <= S_RREQ;
            addr       <= s_axi_araddr;
            beats_left <= s_axi_arlen;
            size       <= s_axi_arsize;
            burst      <= s_axi_arburst;
            id         <= s_axi_arid;
          end
        end
        S_WDATA: if (s_axi_wvalid) begin
          addr <= addr_next;
          if (s_axi_wlast || beats_left == 8'd0) st <= S_BRESP;
          else beats_left <= beats_left - 8'd1;
        end
        S_BRESP: if (s_axi_bready) st <= S_IDLE;
        S_RREQ:  st <= S_RWAIT;
        S_RWAIT: begin
          s_axi_rdata <= rsp_rdata;
          st          <= S_RDATA;
        end
        S_RDATA: if (s_axi_rready) begin
          if (beats_left == 8'd0) begin
            st <= S_IDLE;
          end else begin
            beats_left <= beats_left - 8'd1;
            addr       <= addr_next;
            st         <= S_RREQ;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign s_axi_awready = (st == S_IDLE);
  assign s_axi_arready = (st == S_IDLE) && !s_axi_awvalid;
  assign s_axi_wready  = (st == S_WDATA);
  assign s_axi_bvalid  = (st == S_BRESP);
  assign s_axi_bid     = id;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rvalid  = (st == S_RDATA);
  assign s_axi_rid     = id;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_rlast   = (st == S_RDATA) && (beats_left == 8'd0);

  assign req_we    = (st == S_WDATA) && s_axi_wvalid;
  assign req_re    = (st == S_RREQ);
  assign req_addr  = addr;
  assign req_wdata = s_axi_wdata;
  assign req_wstrb = s_axi_wstrb;

  // AXI4 rule: a valid response stays asserted until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);

endmodule
