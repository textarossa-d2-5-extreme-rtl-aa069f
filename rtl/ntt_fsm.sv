// ALU NTT FSM: controller of the RLWE encryption datapath.
//
// It runs one command at a time:
//   OP_NTT_S / OP_NTT_ME  in-place forward negacyclic NTT (Cooley-Tukey,
//       twiddles psi^brv(k) from the Roots RAM, output in bit-reversed order).
//       Stage 0 reads the shared DPRAM and writes DPRAM1 (s) or DPRAM2 (m+e);
//       stages 1..logn-1 read and write that memory in place.
//   OP_ENCRYPT  for i = 0..n-1: U = DPRAM2[i], V = DPRAM1[i], R = shared[i]
//       (coefficient of a); diff = U - V*R is written back to shared[i].
// Stage s (m = 2^s groups, half-width t = n >> (s+1)) visits butterfly
// k = 0..n/2-1 with j = 2*t*(k >> log2 t) + (k mod t); it pairs j with j+t
// and uses root index m + (k >> log2 t).
//
// The butterflies are pipelined two cycles apart. A butterfly is read in
// cycle c (rd_en, rd_addr_a/b, root_addr), its operands reach the ALU in c+1
// (alu_valid), the ALU result is registered in the write-back stage at the
// end of c+4 and written in c+5 (wr_en, wr_addr_a/b). Reads therefore use
// every other cycle and writes the cycles in between, so the two ports of
// each dual-port RAM are never asked for a read and a write at once.
// Butterflies of one stage touch distinct addresses; between stages the FSM
// lets the pipeline drain, so stage s+1 never reads a word before stage s has
// written it. A stage of N butterflies (or N coefficients for ENCRYPT) takes
// 2N + 4 cycles; done pulses one cycle after the last write, so an NTT of
// degree n takes logn*(n + 4) + 1 cycles and the encryption step 2n + 5.
// The description names this FSM and its role; the schedule is this design's.
module ntt_fsm
  import he_pkg::*;
#(
  parameter int unsigned MAX_LOGN = he_pkg::HE_MAX_LOGN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  he_op_e              op,
  input  logic [3:0]          logn,      // 1..MAX_LOGN
  output logic                busy,
  output logic                done,
  // datapath control
  output he_src_e             u_src,     // mux1
  output he_src_e             v_src,     // mux2
  output he_rsrc_e            r_src,     // mux3
  output he_dst_e             dst,       // demux1 / demux2
  output logic                rd_en,     // read the source ports (and R)
  output logic                alu_valid, // operands present at the ALU
  output logic                wr_en,     // write results to the destination
  output logic [MAX_LOGN-1:0] rd_addr_a, // U address
  output logic [MAX_LOGN-1:0] rd_addr_b, // V address (and R for ENCRYPT)
  output logic [MAX_LOGN-1:0] root_addr, // Roots RAM address (mux5)
  output logic [MAX_LOGN-1:0] wr_addr_a, // sum address
  output logic [MAX_LOGN-1:0] wr_addr_b  // diff address
);

  localparam int unsigned LAT = 5;  // read to write-back, in cycles

  typedef enum logic [1:0] {F_IDLE, F_ISSUE, F_DRAIN} fstate_e;

  fstate_e           st;
  he_op_e            op_q;
  logic              ph;       // 0: read slot, 1: write slot
  logic [3:0]        stage;
  logic [MAX_LOGN:0] k;        // butterfly / coefficient counter
  logic [3:0]        lgt;      // log2 t of the current stage
  logic [MAX_LOGN:0] k_last;
  logic              encrypt;
  logic [LAT:1]      vld;      // vld[d]: a read issued d cycles ago
  logic [MAX_LOGN-1:0] pa [LAT:1];
  logic [MAX_LOGN-1:0] pb [LAT:1];

  assign encrypt = (op_q == OP_ENCRYPT);
  assign lgt     = logn - 4'd1 - stage;
  assign k_last  = encrypt ? ((MAX_LOGN+1)'(1) << logn) - 1
                           : ((MAX_LOGN+1)'(1) << (logn - 4'd1)) - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= F_IDLE;
      op_q  <= OP_NONE;
      ph    <= 1'b0;
      stage <= '0;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        F_IDLE: if (start && (op == OP_NTT_S || op == OP_NTT_ME || op == OP_ENCRYPT)) begin
          st    <= F_ISSUE;
          op_q  <= op;
          ph    <= 1'b0;
          stage <= '0;
          k     <= '0;
        end
        F_ISSUE: begin
          ph <= ~ph;
          if (!ph) begin
            if (k != k_last) begin
              k <= k + 1;
            end else begin
              k  <= '0;
              st <= F_DRAIN;
            end
          end
        end
        F_DRAIN: begin
          // leave when the last write of the stage is under way
          if (vld[LAT-1:1] == '0) begin
            ph <= 1'b0;
            if (encrypt || stage == logn - 4'd1) begin
              st   <= F_IDLE;
              done <= 1'b1;
            end else begin
              st    <= F_ISSUE;
              stage <= stage + 4'd1;
            end
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  // address generation for the read slot
  logic [MAX_LOGN:0] grp, j, tval;
  always_comb begin
    tval = (MAX_LOGN+1)'(1) << lgt;
    grp  = k >> lgt;
    j    = ((grp << 1) << lgt) | (k & (tval - 1));
    if (encrypt) begin
      rd_addr_a = k[MAX_LOGN-1:0];
      rd_addr_b = k[MAX_LOGN-1:0];
      root_addr = '0;
    end else begin
      rd_addr_a = j[MAX_LOGN-1:0];
      rd_addr_b = MAX_LOGN'(j + tval);
      root_addr = MAX_LOGN'(((MAX_LOGN+1)'(1) << stage) + grp);
    end
  end

  assign rd_en = (st == F_ISSUE) && !ph;

  // delay line carrying the butterfly addresses to the write-back slot
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int d = 1; d <= LAT; d++) begin
        pa[d] <= '0;
        pb[d] <= '0;
      end
    end else begin
      vld   <= {vld[LAT-1:1], rd_en};
      pa[1] <= rd_addr_a;
      pb[1] <= rd_addr_b;
      for (int d = 2; d <= LAT; d++) begin
        pa[d] <= pa[d-1];
        pb[d] <= pb[d-1];
      end
    end
  end

  assign alu_valid = vld[1];
  assign wr_en     = vld[LAT];
  assign wr_addr_a = pa[LAT];
  assign wr_addr_b = pb[LAT];

  // multiplexer selects
  always_comb begin
    u_src = SRC_SHARED;
    v_src = SRC_SHARED;
    r_src = R_ROOTS;
    dst   = DST_DP1;
    unique case (op_q)
      OP_NTT_S: begin
        u_src = (stage == 4'd0) ? SRC_SHARED : SRC_DP1;
        v_src = u_src;
        dst   = DST_DP1;
      end
      OP_NTT_ME: begin
        u_src = (stage == 4'd0) ? SRC_SHARED : SRC_DP2;
        v_src = u_src;
        dst   = DST_DP2;
      end
      OP_ENCRYPT: begin
        u_src = SRC_DP2;
        v_src = SRC_DP1;
        r_src = R_SHARED;
        dst   = DST_SHARED;
      end
      default: ;
    endcase
  end

  assign busy = (st != F_IDLE);

  // a read and a write never share a cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && wr_en));

endmodule
