// Secure crypto IP pair: homomorphic-encryption and SHAKE accelerators.
//
// The two accelerators are independent memory-mapped AXI4 slaves and are
// placed side by side, each with its own slave port, sharing only the clock
// and the active-low asynchronous reset:
//   he_*  RLWE/NTT accelerator for SEAL-Embedded symmetric encryption
//         (32-bit data, 18-bit address); he_irq_done pulses when a command ends
//   sh_*  SHAKE-128/256 accelerator (64-bit data by default, 32 allowed)
// In a system each port connects to a master port of an AXI4 interconnect
// driven by a host CPU or a DMA engine, which are not part of this RTL.
// Putting both IPs in one wrapper is this design's choice; the description
// presents them as two separate IPs with the same kind of interface.
module crypto_top #(
  parameter int unsigned HE_MAX_LOGN = 14,
  parameter int unsigned HE_ADDR_W   = 18,
  localparam int unsigned HE_DATA_W  = 32,
  parameter int unsigned SH_DATA_W   = 64,
  parameter int unsigned SH_ADDR_W   = 12,
  parameter int unsigned ID_W        = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [ID_W-1:0] he_axi_awid,
  input  logic [HE_ADDR_W-1:0] he_axi_awaddr,
  input  logic [7:0] he_axi_awlen,
  input  logic [2:0] he_axi_awsize,
  input  logic [1:0] he_axi_awburst,
  input  logic he_axi_awvalid,
  output logic he_axi_awready,
  input  logic [HE_DATA_W-1:0] he_axi_wdata,
  input  logic [HE_DATA_W/8-1:0] he_axi_wstrb,
  input  logic he_axi_wlast,
  input  logic he_axi_wvalid,
  output logic he_axi_wready,
  output logic [ID_W-1:0] he_axi_bid,
  output logic [1:0] he_axi_bresp,
  output logic he_axi_bvalid,
  input  logic he_axi_bready,
  input  logic [ID_W-1:0] he_axi_arid,
  input  logic [HE_ADDR_W-1:0] he_axi_araddr,
  input  logic [7:0] he_axi_arlen,
  input  logic [2:0] he_axi_arsize,
  input  logic [1:0] he_axi_arburst,
  input  logic he_axi_arvalid,
  output logic he_axi_arready,
  output logic [ID_W-1:0] he_axi_rid,
  output logic [HE_DATA_W-1:0] he_axi_rdata,
  output logic [1:0] he_axi_rresp,
  output logic he_axi_rlast,
  output logic he_axi_rvalid,
  input  logic he_axi_rready,
  output logic he_irq_done,
  input  logic [ID_W-1:0] sh_axi_awid,
  input  logic [SH_ADDR_W-1:0] sh_axi_awaddr,
  input  logic [7:0] sh_axi_awlen,
  input  logic [2:0] sh_axi_awsize,
  input  logic [1:0] sh_axi_awburst,
  input  logic sh_axi_awvalid,
  output logic sh_axi_awready,
  input  logic [SH_DATA_W-1:0] sh_axi_wdata,
  input  logic [SH_DATA_W/8-1:0] sh_axi_wstrb,
  input  logic sh_axi_wlast,
  input  logic sh_axi_wvalid,
  output logic sh_axi_wready,
  output logic [ID_W-1:0] sh_axi_bid,
  output logic [1:0] sh_axi_bresp,
  output logic sh_axi_bvalid,
  input  logic sh_axi_bready,
  input  logic [ID_W-1:0] sh_axi_arid,
  input  logic [SH_ADDR_W-1:0] sh_axi_araddr,
  input  logic [7:0] sh_axi_arlen,
  input  logic [2:0] sh_axi_arsize,
  input  logic [1:0] sh_axi_arburst,
  input  logic sh_axi_arvalid,
  output logic sh_axi_arready,
  output logic [ID_W-1:0] sh_axi_rid,
  output logic [SH_DATA_W-1:0] sh_axi_rdata,
  output logic [1:0] sh_axi_rresp,
  output logic sh_axi_rlast,
  output logic sh_axi_rvalid,
  input  logic sh_axi_rready
);

  he_accel #(.MAX_LOGN(HE_MAX_LOGN), .ADDR_W(HE_ADDR_W), .ID_W(ID_W)) u_he (
    .clk, .rst_n,
    .s_axi_awid    (he_axi_awid),
    .s_axi_awaddr  (he_axi_awaddr),
    .s_axi_awlen   (he_axi_awlen),
    .s_axi_awsize  (he_axi_awsize),
    .s_axi_awburst (he_axi_awburst),
    .s_axi_awvalid (he_axi_awvalid),
    .s_axi_awready (he_axi_awready),
    .s_axi_wdata   (he_axi_wdata),
    .s_axi_wstrb   (he_axi_wstrb),
    .s_axi_wlast   (he_axi_wlast),
    .s_axi_wvalid  (he_axi_wvalid),
    .s_axi_wready  (he_axi_wready),
    .s_axi_bid     (he_axi_bid),
    .s_axi_bresp   (he_axi_bresp),
    .s_axi_bvalid  (he_axi_bvalid),
    .s_axi_bready  (he_axi_bready),
    .s_axi_arid    (he_axi_arid),
    .s_axi_araddr  (he_axi_araddr),
    .s_axi_arlen   (he_axi_arlen),
    .s_axi_arsize  (he_axi_arsize),
    .s_axi_arburst (he_axi_arburst),
    .s_axi_arvalid (he_axi_arvalid),
    .s_axi_arready (he_axi_arready),
    .s_axi_rid     (he_axi_rid),
    .s_axi_rdata   (he_axi_rdata),
    .s_axi_rresp   (he_axi_rresp),
    .s_axi_rlast   (he_axi_rlast),
    .s_axi_rvalid  (he_axi_rvalid),
    .s_axi_rready  (he_axi_rready),
    .irq_done  (he_irq_done)
  );

  shake_accel #(.DATA_W(SH_DATA_W), .ADDR_W(SH_ADDR_W), .ID_W(ID_W)) u_shake (
    .clk, .rst_n,
    .s_axi_awid    (sh_axi_awid),
    .s_axi_awaddr  (sh_axi_awaddr),
    .s_axi_awlen   (sh_axi_awlen),
    .s_axi_awsize  (sh_axi_awsize),
    .s_axi_awburst (sh_axi_awburst),
    .s_axi_awvalid (sh_axi_awvalid),
    .s_axi_awready (sh_axi_awready),
    .s_axi_wdata   (sh_axi_wdata),
    .s_axi_wstrb   (sh_axi_wstrb),
    .s_axi_wlast   (sh_axi_wlast),
    .s_axi_wvalid  (sh_axi_wvalid),
    .s_axi_wready  (sh_axi_wready),
    .s_axi_bid     (sh_axi_bid),
    .s_axi_bresp   (sh_axi_bresp),
    .s_axi_bvalid  (sh_axi_bvalid),
    .s_axi_bready  (sh_axi_bready),
    .s_axi_arid    (sh_axi_arid),
    .s_axi_araddr  (sh_axi_araddr),
    .s_axi_arlen   (sh_axi_arlen),
    .s_axi_arsize  (sh_axi_arsize),
    .s_axi_arburst (sh_axi_arburst),
    .s_axi_arvalid (sh_axi_arvalid),
    .s_axi_arready (sh_axi_arready),
    .s_axi_rid     (sh_axi_rid),
    .s_axi_rdata   (sh_axi_rdata),
    .s_axi_rresp   (sh_axi_rresp),
    .s_axi_rlast   (sh_axi_rlast),
    .s_axi_rvalid  (sh_axi_rvalid),
    .s_axi_rready  (sh_axi_rready)
  );

endmodule
