// RLWE encryption core of the homomorphic-encryption accelerator.
//
// Holds the four memories and the datapath around the ALU butterfly:
//   DPRAM1      NTT(s), the transformed secret key
//   DPRAM2      NTT(m+e), the transformed plaintext plus error
//   shared DPRAM  the window shared with the host: it receives s, m+e and a
//               from the host and returns c0
//   Roots RAM   psi^brv(i), written by the roots generator
// mux1/mux2 pick the U/V operands from port A/port B of the shared DPRAM,
// DPRAM1 or DPRAM2; mux3 picks R from the Roots RAM or the shared DPRAM;
// demux1/demux2 send sum/diff back to DPRAM1, DPRAM2 or (diff only) the
// shared DPRAM. mux4/mux6 give shared-DPRAM port A to the host whenever the
// core is idle and to the write-back path while it runs; mux5 gives the Roots
// RAM port to the roots generator or to the FSM. The ALU results pass a
// write-back register, so a write always falls in the cycle between two
// reads; each RAM port takes the FSM's read address in read cycles and the
// write-back address in write cycles.
//
// Host port: host_en/host_we/host_addr/host_wdata, host_rdata one cycle
// later. It is ignored while busy is high. Commands (he_pkg::he_op_e) start on
// a start pulse; done pulses at the end. Expected use: GEN_ROOTS; write s,
// NTT_S; write m+e, NTT_ME; write a, ENCRYPT; read c0.
// The blocks, multiplexers and data flow follow the description's
// architecture figure; the assignment of memory ports is this design's.
module he_rlwe_core
  import he_pkg::*;
#(
  parameter int unsigned MAX_LOGN = he_pkg::HE_MAX_LOGN,
  parameter int unsigned W        = he_pkg::HE_COEF_W,
  parameter int unsigned MU_W     = he_pkg::HE_MU_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic [3:0]          logn,
  input  logic [W-1:0]        q,
  input  logic [MU_W-1:0]     mu,
  input  logic [W-1:0]        psi,
  // command
  input  logic                start,
  input  he_op_e              op,
  output logic                busy,
  output logic                done,
  // host access to the shared DPRAM
  input  logic                host_en,
  input  logic                host_we,
  input  logic [MAX_LOGN-1:0] host_addr,
  input  logic [W-1:0]        host_wdata,
  output logic [W-1:0]        host_rdata
);

  localparam int unsigned DEPTH = 1 << MAX_LOGN;

  // ---------------- controller and roots generator ----------------
  he_src_e             u_src, v_src;
  he_rsrc_e            r_src;
  he_dst_e             dst;
  logic                rd_en, alu_valid, wr_en;
  logic [MAX_LOGN-1:0] rd_addr_a, rd_addr_b, wr_addr_a, wr_addr_b, root_addr;
  logic                fsm_busy, fsm_done, gen_busy, gen_done;
  logic                gen_wr;
  logic [MAX_LOGN-1:0] gen_addr;
  logic [W-1:0]        gen_data;

  ntt_fsm #(.MAX_LOGN(MAX_LOGN)) u_fsm (
    .clk, .rst_n,
    .start    (start && !busy),
    .op,
    .logn,
    .busy     (fsm_busy),
    .done     (fsm_done),
    .u_src, .v_src, .r_src, .dst,
    .rd_en, .alu_valid, .wr_en,
    .rd_addr_a, .rd_addr_b, .root_addr, .wr_addr_a, .wr_addr_b
  );

  roots_generator #(.W(W), .MU_W(MU_W), .MAX_LOGN(MAX_LOGN)) u_roots_gen (
    .clk, .rst_n,
    .start   (start && !busy && op == OP_GEN_ROOTS),
    .logn, .psi, .q, .mu,
    .busy    (gen_busy),
    .done    (gen_done),
    .wr_en   (gen_wr),
    .wr_addr (gen_addr),
    .wr_data (gen_data)
  );

  assign busy = fsm_busy | gen_busy;
  assign done = fsm_done | gen_done;

  // ---------------- memories ----------------
  logic [W-1:0] rt_b_unused;  // port B of the Roots RAM is not used
  logic [W-1:0] d1_a_rd, d1_b_rd, d2_a_rd, d2_b_rd, sh_a_rd, sh_b_rd, rt_rd;
  logic [W-1:0] alu_sum, alu_diff, wb_sum, wb_diff;
  logic         alu_out_valid, wb_valid;

  // Each RAM port takes the read address in read cycles and the write-back
  // address in write cycles; the FSM never asks for both at once.
  logic [MAX_LOGN-1:0] port_a_addr, port_b_addr;
  assign port_a_addr = wr_en ? wr_addr_a : rd_addr_a;
  assign port_b_addr = wr_en ? wr_addr_b : rd_addr_b;

  // DPRAM1
  logic d1_rd, d1_wr;
  assign d1_rd = rd_en && (u_src == SRC_DP1 || v_src == SRC_DP1);
  assign d1_wr = wr_en && (dst == DST_DP1);
  dpram #(.DEPTH(DEPTH), .WIDTH(W)) u_dpram1 (
    .clk,
    .a_en(d1_rd || d1_wr), .a_we(d1_wr), .a_addr(port_a_addr), .a_wdata(wb_sum),  .a_rdata(d1_a_rd),
    .b_en(d1_rd || d1_wr), .b_we(d1_wr), .b_addr(port_b_addr), .b_wdata(wb_diff), .b_rdata(d1_b_rd)
  );

  // DPRAM2
  logic d2_rd, d2_wr;
  assign d2_rd = rd_en && (u_src == SRC_DP2 || v_src == SRC_DP2);
  assign d2_wr = wr_en && (dst == DST_DP2);
  dpram #(.DEPTH(DEPTH), .WIDTH(W)) u_dpram2 (
    .clk,
    .a_en(d2_rd || d2_wr), .a_we(d2_wr), .a_addr(port_a_addr), .a_wdata(wb_sum),  .a_rdata(d2_a_rd),
    .b_en(d2_rd || d2_wr), .b_we(d2_wr), .b_addr(port_b_addr), .b_wdata(wb_diff), .b_rdata(d2_b_rd)
  );

  // shared DPRAM: port A through mux4 (address) / mux6 (write data)
  logic                sh_a_en, sh_a_we, sh_b_en;
  logic [MAX_LOGN-1:0] sh_a_addr;
  logic [W-1:0]        sh_a_wdata;
  logic                fsm_sh_rd, fsm_sh_wr;
  assign fsm_sh_rd = rd_en && (u_src == SRC_SHARED || r_src == R_SHARED);
  assign fsm_sh_wr = wr_en && (dst == DST_SHARED);
  always_comb begin
    if (busy) begin
      sh_a_en    = fsm_sh_rd || fsm_sh_wr;
      sh_a_we    = fsm_sh_wr;
      sh_a_addr  = port_a_addr;
      sh_a_wdata = wb_diff;
    end else begin
      sh_a_en    = host_en;
      sh_a_we    = host_we;
      sh_a_addr  = host_addr;
      sh_a_wdata = host_wdata;
    end
  end
  assign sh_b_en = rd_en && (v_src == SRC_SHARED || r_src == R_SHARED);
  dpram #(.DEPTH(DEPTH), .WIDTH(W)) u_shared (
    .clk,
    .a_en(sh_a_en), .a_we(sh_a_we), .a_addr(sh_a_addr), .a_wdata(sh_a_wdata), .a_rdata(sh_a_rd),
    .b_en(sh_b_en), .b_we(1'b0),    .b_addr(rd_addr_b), .b_wdata('0),         .b_rdata(sh_b_rd)
  );
  assign host_rdata = sh_a_rd;

  // Roots RAM: single port used, address through mux5
  logic                rt_en;
  logic [MAX_LOGN-1:0] rt_addr;
  assign rt_en   = gen_wr || (rd_en && r_src == R_ROOTS);
  assign rt_addr = gen_busy ? gen_addr : root_addr;
  dpram #(.DEPTH(DEPTH), .WIDTH(W)) u_roots_ram (
    .clk,
    .a_en(rt_en), .a_we(gen_wr), .a_addr(rt_addr), .a_wdata(gen_data), .a_rdata(rt_rd),
    .b_en(1'b0),  .b_we(1'b0),   .b_addr('0),      .b_wdata('0),       .b_rdata(rt_b_unused)
  );

  // ---------------- operand multiplexers and ALU ----------------
  logic [W-1:0] u_op, v_op, r_op;
  always_comb begin
    unique case (u_src)                       // mux1
      SRC_DP1: u_op = d1_a_rd;
      SRC_DP2: u_op = d2_a_rd;
      default: u_op = sh_a_rd;
    endcase
    unique case (v_src)                       // mux2
      SRC_DP1: v_op = d1_b_rd;
      SRC_DP2: v_op = d2_b_rd;
      default: v_op = sh_b_rd;
    endcase
    r_op = (r_src == R_SHARED) ? sh_b_rd : rt_rd;   // mux3
  end

  alu_butterfly #(.W(W), .MU_W(MU_W)) u_alu (
    .clk, .rst_n,
    .in_valid (alu_valid),
    .u        (u_op),
    .v        (v_op),
    .r        (r_op),
    .q, .mu,
    .out_valid(alu_out_valid),
    .sum      (alu_sum),
    .diff     (alu_diff)
  );

  // write-back register: the ALU result is written one cycle after it is
  // ready, which puts every write into the cycle between two reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_valid <= 1'b0;
    else        wb_valid <= alu_out_valid;
  end
  always_ff @(posedge clk) begin
    wb_sum  <= alu_sum;
    wb_diff <= alu_diff;
  end

  // The FSM writes exactly when a result sits in the write-back register.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wb_valid);

endmodule
