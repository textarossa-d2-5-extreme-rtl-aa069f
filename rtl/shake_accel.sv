// SHAKE-128/256 extendable-output-function accelerator.
//
// An AXI4 slave with a 32- or 64-bit data bus gives the host four registers:
//   word 0  CONFIG  RW [0] mode: 0 SHAKE-128 (rate 1344), 1 SHAKE-256 (1088)
//   word 1  CMD     W  [1:0] 1 = absorb the block in the data register,
//                            2 = squeeze (permute, reload the data register)
//                      [2] first block of a message (absorb into zero state)
//                      [3] last block (pad it; reload the data register with
//                          the first output block when the permutation ends)
//                      [15:8] message bytes in the last block
//   word 2  STATUS  R  [0] busy, [1] output block ready in the data register
//   word 3  DATA    RW write: shift a word into the data register;
//                      read: return the next output word and shift
// Word w is at byte address w * DATA_W/8. Use: set CONFIG; for each block
// write rate/DATA_W words to DATA (the last block zero-filled) and issue an
// absorb command; after the last block read output words from DATA, issuing
// squeeze for each further block. Writes to CMD and DATA while busy are
// ignored. Each permutation takes 24 cycles (one Keccak round per cycle).
// Registers, data register, FSM and SHAKE core follow the description's
// block diagram; the register layout and command encoding are this
// design's choices.
module shake_accel
  import shake_pkg::*;
#(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned ID_W   = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ID_W-1:0]     s_axi_awid,
  input  logic [ADDR_W-1:0]   s_axi_awaddr,
  input  logic [7:0]          s_axi_awlen,
  input  logic [2:0]          s_axi_awsize,
  input  logic [1:0]          s_axi_awburst,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [DATA_W-1:0]   s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic                s_axi_wlast,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [ID_W-1:0]     s_axi_bid,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [ID_W-1:0]     s_axi_arid,
  input  logic [ADDR_W-1:0]   s_axi_araddr,
  input  logic [7:0]          s_axi_arlen,
  input  logic [2:0]          s_axi_arsize,
  input  logic [1:0]          s_axi_arburst,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [ID_W-1:0]     s_axi_rid,
  output logic [DATA_W-1:0]   s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rlast,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready
);

  localparam int unsigned OFF = $clog2(DATA_W/8);
  localparam logic [1:0] R_CONFIG = 2'd0, R_CMD = 2'd1, R_STATUS = 2'd2, R_DATA = 2'd3;
  localparam logic [1:0] CMD_ABSORB = 2'd1, CMD_SQUEEZE = 2'd2;

  logic                req_we, req_re;
  logic [ADDR_W-1:0]   req_addr;
  logic [DATA_W-1:0]   req_wdata, rsp_rdata;
  logic [DATA_W/8-1:0] req_wstrb;

  axi4_slave #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .ID_W(ID_W)) u_axi (
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

  logic [1:0] ridx;
  assign ridx = req_addr[OFF +: 2];

  // ---------------- FSM ----------------
  typedef enum logic [1:0] {A_IDLE, A_ABSORB, A_SQUEEZE} astate_e;
  astate_e     st;
  shake_mode_e mode;
  logic        last_q, out_ready;
  logic        core_busy, core_done;
  logic        cmd_wr, do_absorb, do_squeeze;
  logic [DREG_W-1:0] dreg_q, trunc, block_aligned, block_padded;
  logic [DATA_W-1:0] dreg_rdata;

  assign cmd_wr     = req_we && ridx == R_CMD && st == A_IDLE;
  assign do_absorb  = cmd_wr && req_wdata[1:0] == CMD_ABSORB;
  assign do_squeeze = cmd_wr && req_wdata[1:0] == CMD_SQUEEZE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= A_IDLE;
      mode      <= SHAKE128;
      last_q    <= 1'b0;
      out_ready <= 1'b0;
    end else begin
      if (req_we && ridx == R_CONFIG && st == A_IDLE) mode <= shake_mode_e'(req_wdata[0]);
      unique case (st)
        A_IDLE: begin
          if (do_absorb) begin
            st        <= A_ABSORB;
            last_q    <= req_wdata[3];
            out_ready <= 1'b0;
          end else if (do_squeeze) begin
            st        <= A_SQUEEZE;
            out_ready <= 1'b0;
          end
        end
        A_ABSORB: if (core_done) begin
          st <= A_IDLE;
          if (last_q) out_ready <= 1'b1;
        end
        A_SQUEEZE: if (core_done) begin
          st        <= A_IDLE;
          out_ready <= 1'b1;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  // ---------------- data register, padder, core ----------------
  logic load_out;
  assign load_out = core_done && (st == A_SQUEEZE || (st == A_ABSORB && last_q));

  shake_data_reg #(.DATA_W(DATA_W)) u_dreg (
    .clk, .rst_n,
    .shift_in (req_we && ridx == R_DATA && st == A_IDLE),
    .wdata    (req_wdata),
    .shift_out(req_re && ridx == R_DATA),
    .load     (load_out),
    .load_data(trunc),
    .rdata    (dreg_rdata),
    .q        (dreg_q)
  );

  assign block_aligned = (mode == SHAKE256) ? (dreg_q >> (DREG_W - RATE256)) : dreg_q;

  shake_padder u_pad (
    .block_in (block_aligned),
    .mode,
    .last     (req_wdata[3]),
    .nbytes   (req_wdata[15:8]),
    .block_out(block_padded)
  );

  shake_core u_core (
    .clk, .rst_n,
    .mode,
    .absorb   (do_absorb),
    .first    (req_wdata[2]),
    .block    (block_padded),
    .squeeze  (do_squeeze),
    .busy     (core_busy),
    .done     (core_done),
    .trunc_out(trunc)
  );

  // ---------------- read data ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_rdata <= '0;
    else if (req_re) begin
      unique case (ridx)
        R_CONFIG: rsp_rdata <= DATA_W'(mode);
        R_STATUS: rsp_rdata <= DATA_W'({out_ready, st != A_IDLE});
        R_DATA:   rsp_rdata <= dreg_rdata;
        default:  rsp_rdata <= '0;
      endcase
    end
  end

  // The core only starts from the idle state.
  assert property (@(posedge clk) disable iff (!rst_n) (do_absorb || do_squeeze) |-> !core_busy);

  // byte strobes are not used (every write beat writes a whole word) and the
  // address bits outside the register index alias
  logic unused_req;
  assign unused_req = ^{req_wstrb, req_addr};

endmodule
