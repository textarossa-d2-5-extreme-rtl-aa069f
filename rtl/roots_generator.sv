// Roots generator: fills the Roots RAM with the twiddle factors of the NTT.
//
// For a degree n = 2^logn and a primitive 2n-th root of unity psi modulo q it
// computes the powers psi^0, psi^1, ..., psi^(n-1) one after the other
// (p <- p*psi mod q, Barrett reduced) and writes psi^i to address
// bit-reverse_logn(i). That is the table a Cooley-Tukey negacyclic forward
// NTT reads in natural order: stage with m groups uses entries m..2m-1.
//
// Interface: pulse start with logn/psi/q/mu stable; the generator raises busy,
// issues one write (wr_en, wr_addr, wr_data) every two cycles and pulses
// done in the cycle after the last write, 2n cycles after start.
// The description says only that this block computes and stores the roots;
// the power-by-power method and the bit-reversed layout are this design's.
module roots_generator #(
  parameter int unsigned W        = 32,
  parameter int unsigned MU_W     = 64,
  parameter int unsigned MAX_LOGN = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [3:0]          logn,   // 1..MAX_LOGN
  input  logic [W-1:0]        psi,
  input  logic [W-1:0]        q,
  input  logic [MU_W-1:0]     mu,
  output logic                busy,
  output logic                done,
  output logic                wr_en,
  output logic [MAX_LOGN-1:0] wr_addr,
  output logic [W-1:0]        wr_data
);

  typedef enum logic [1:0] {G_IDLE, G_WRITE, G_MUL} gstate_e;

  gstate_e             st;
  logic [MAX_LOGN:0]   idx;       // power being produced
  logic [W-1:0]        pw;        // psi^idx
  logic [2*W-1:0]      prod;      // pw*psi, registered
  logic [W-1:0]        red;
  logic [MAX_LOGN:0]   n_val;

  assign n_val = (MAX_LOGN+1)'(1) << logn;

  barrett_reduce #(.W(W), .MU_W(MU_W)) u_barrett (
    .x (prod),
    .q (q),
    .mu(mu),
    .r (red)
  );

  // bit-reversal of idx over logn bits
  function automatic logic [MAX_LOGN-1:0] brv(input logic [MAX_LOGN-1:0] i,
                                               input logic [3:0] lg);
    logic [MAX_LOGN-1:0] o;
    o = '0;
    for (int b = 0; b < MAX_LOGN; b++)
      if (b < int'(lg)) o[int'(lg)-1-b] = i[b];
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= G_IDLE;
      idx  <= '0;
      pw   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        G_IDLE: if (start) begin
          st  <= G_WRITE;
          idx <= '0;
          pw  <= W'(1);
        end
        G_WRITE: begin              // write psi^idx, start next product
          if (idx + 1 == n_val) begin
            st   <= G_IDLE;
            done <= 1'b1;
          end else begin
            st <= G_MUL;
          end
        end
        G_MUL: begin                // product registered, reduce it
          pw  <= red;
          idx <= idx + 1;
          st  <= G_WRITE;
        end
        default: st <= G_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) prod <= {{W{1'b0}}, pw} * {{W{1'b0}}, psi};

  assign busy    = (st != G_IDLE);
  assign wr_en   = (st == G_WRITE);
  assign wr_addr = brv(idx[MAX_LOGN-1:0], logn);
  assign wr_data = pw;

endmodule
