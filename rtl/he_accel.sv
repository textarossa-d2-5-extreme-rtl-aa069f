// Homomorphic-encryption accelerator: SEAL-Embedded symmetric RLWE encryption.
//
// An AXI4 slave (32-bit data, 18-bit byte address) in front of the RLWE
// encryption core. The host (CPU or DMA) writes the secret key s, the encoded
// plaintext plus error (m+e) and the public random polynomial a into the
// shared DPRAM one after another, starting a command after each; the core
// returns c0 = NTT(m+e) - a*NTT(s) mod q (NTT domain, bit-reversed order) in
// the shared DPRAM. c1 = a is already known to the host.
//
// Address map (byte addresses):
//   0x00000 + 4*i   shared DPRAM word i (i < 2^MAX_LOGN); host access is
//                   ignored (reads return stale data) while the core is busy
//   0x20000         CTRL    W  [2:0] command (he_pkg::he_op_e), starts it
//   0x20004         STATUS  R  [0] busy, [1] done (set at the end of a
//                              command, cleared by the next command)
//   0x20008         LOGN    RW log2 n, 1..MAX_LOGN
//   0x2000C         Q       RW modulus, below 2^31
//   0x20010/0x20014 MU      RW floor(2^62 / q), low and high word
//   0x20018         PSI     RW primitive 2n-th root of unity modulo q
// Configuration and status registers reset to zero. Reads of any address
// return one cycle after the request, as axi4_slave expects.
// The configuration/status registers, the shared memory and the 32/18-bit
// AXI4 slave follow the description; the register layout is this design's.
module he_accel
  import he_pkg::*;
#(
  parameter int unsigned MAX_LOGN = he_pkg::HE_MAX_LOGN,
  parameter int unsigned ADDR_W   = 18,
  parameter int unsigned ID_W     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   s_axi_awid,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic [7:0]        s_axi_awlen,
  input  logic [2:0]        s_axi_awsize,
  input  logic [1:0]        s_axi_awburst,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wlast,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [ID_W-1:0]   s_axi_bid,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ID_W-1:0]   s_axi_arid,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic [7:0]        s_axi_arlen,
  input  logic [2:0]        s_axi_arsize,
  input  logic [1:0]        s_axi_arburst,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [ID_W-1:0]   s_axi_rid,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rlast,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic              irq_done      // one-cycle pulse when a command ends
);

  localparam int unsigned W = HE_COEF_W;
  localparam int unsigned MU_W = HE_MU_W;

  logic              req_we, req_re;
  logic [ADDR_W-1:0] req_addr;
  logic [31:0]       req_wdata, rsp_rdata;
  logic [3:0]        req_wstrb;

  axi4_slave #(.ADDR_W(ADDR_W), .DATA_W(32), .ID_W(ID_W)) u_axi (
    .clk, .rst_n,
    .s_axi_awid, .s_axi_awaddr, .s_axi_awlen, .s_axi_awsize, .s_axi_awburst,
    .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wlast, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bid, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_arid, .s_axi_araddr, .s_axi_arlen, .s_axi_arsize, .s_axi_arburst,
    .s_axi_arvalid, .s_axi_arready,
    .s_axi_rid, .s_axi_rdata, .s_axi_rresp, .s_axi_rlast, .s_axi_rvalid, .s_axi_rready,
    .req_we, .req_re, .req_addr, .req_wdata, .req_wstrb, .rsp_rdata
  );

  logic       is_reg;
  logic [2:0] reg_idx;
  assign is_reg  = req_addr[17];
  assign reg_idx = req_addr[4:2];

  // configuration and status registers
  logic [3:0]      logn;
  logic [W-1:0]    q, psi;
  logic [MU_W-1:0] mu;
  logic            start, busy, done, done_flag;
  he_op_e          op;

  assign start = req_we && is_reg && reg_idx == REG_CTRL;
  assign op    = he_op_e'(req_wdata[2:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      logn      <= '0;
      q         <= '0;
      mu        <= '0;
      psi       <= '0;
      done_flag <= 1'b0;
    end else begin
      if (req_we && is_reg && !busy) begin
        unique case (reg_idx)
          REG_LOGN:  logn       <= req_wdata[3:0];
          REG_Q:     q          <= req_wdata;
          REG_MU_LO: mu[31:0]   <= req_wdata;
          REG_MU_HI: mu[63:32]  <= req_wdata;
          REG_PSI:   psi        <= req_wdata;
          default: ;
        endcase
      end
      if (start && !busy)  done_flag <= 1'b0;
      else if (done)       done_flag <= 1'b1;
    end
  end

  // core
  logic [W-1:0] host_rdata;
  he_rlwe_core #(.MAX_LOGN(MAX_LOGN)) u_core (
    .clk, .rst_n,
    .logn, .q, .mu, .psi,
    .start, .op,
    .busy, .done,
    .host_en   ((req_we || req_re) && !is_reg),
    .host_we   (req_we && !is_reg),
    .host_addr (req_addr[MAX_LOGN+1:2]),
    .host_wdata(req_wdata),
    .host_rdata
  );

  // read data: registers are registered here, memory data arrives from the RAM
  logic        rd_is_reg;
  logic [31:0] reg_rdata;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_is_reg <= 1'b0;
      reg_rdata <= '0;
    end else if (req_re) begin
      rd_is_reg <= is_reg;
      unique case (reg_idx)
        REG_STATUS: reg_rdata <= {30'd0, done_flag | done, busy};
        REG_LOGN:   reg_rdata <= {28'd0, logn};
        REG_Q:      reg_rdata <= q;
        REG_MU_LO:  reg_rdata <= mu[31:0];
        REG_MU_HI:  reg_rdata <= mu[63:32];
        REG_PSI:    reg_rdata <= psi;
        default:    reg_rdata <= '0;
      endcase
    end
  end
  assign rsp_rdata = rd_is_reg ? reg_rdata : host_rdata;
  assign irq_done  = done;

  // byte strobes are not used (every write beat writes a whole word) and the
  // address bits outside the decoded fields alias
  logic unused_req;
  assign unused_req = ^{req_wstrb, req_addr};

endmodule
