// Harvey-style NTT butterfly with Barrett-reduced modular multiplication.
//
// Given coefficients U, V and a multiplier r (a twiddle factor from the Roots
// RAM, or a coefficient of the public polynomial a during encryption) it
// produces, modulo q,
//     sum  = U + V*r   (towards demux1)
//     diff = U - V*r   (towards demux2)
// The same unit therefore performs every Cooley-Tukey butterfly of the
// forward NTT and, using only diff, the encryption step
// c0[i] = NTT(m+e)[i] - a[i]*NTT(s)[i].
//
// Pipeline, three register stages, one operation accepted per clock:
//   1. V*r product (2W bits), U delayed
//   2. Barrett reduction of the product, U delayed
//   3. modular addition and subtraction
// out_valid follows in_valid by exactly three cycles. Operands must be below q
// and q below 2^31. The butterfly structure and the Barrett reduction follow
// the design description; the pipeline depth is this design's choice.
module alu_butterfly #(
  parameter int unsigned W    = 32,
  parameter int unsigned MU_W = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [W-1:0]    u,
  input  logic [W-1:0]    v,
  input  logic [W-1:0]    r,
  input  logic [W-1:0]    q,
  input  logic [MU_W-1:0] mu,
  output logic            out_valid,
  output logic [W-1:0]    sum,
  output logic [W-1:0]    diff
);

  localparam int unsigned LATENCY = 3;

  logic [LATENCY-1:0] vld;
  logic [2*W-1:0]     prod_q1;
  logic [W-1:0]       u_q1, u_q2, vr_q2, vr_c;

  barrett_reduce #(.W(W), .MU_W(MU_W)) u_barrett (
    .x (prod_q1),
    .q (q),
    .mu(mu),
    .r (vr_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  logic [W:0] s_full, d_full;
  always_comb begin
    s_full = {1'b0, u_q2} + {1'b0, vr_q2};
    if (s_full >= {1'b0, q}) s_full = s_full - {1'b0, q};
    d_full = (u_q2 >= vr_q2) ? {1'b0, u_q2} - {1'b0, vr_q2}
                             : {1'b0, u_q2} + {1'b0, q} - {1'b0, vr_q2};
  end

  always_ff @(posedge clk) begin
    prod_q1 <= {{W{1'b0}}, v} * {{W{1'b0}}, r};
    u_q1    <= u;
    vr_q2   <= vr_c;
    u_q2    <= u_q1;
    sum     <= s_full[W-1:0];
    diff    <= d_full[W-1:0];
  end

  assign out_valid = vld[LATENCY-1];

  // the borrow bit of the subtraction is zero by construction
  logic unused_borrow;
  assign unused_borrow = d_full[W];

endmodule
