// Barrett modular reduction, x mod q, for a product of two residues.
//
// x is the product of two values below q, so x < q^2 < 2^62. With the
// precomputed constant mu = floor(2^62 / q) the quotient estimate
// t = floor(x * mu / 2^62) is at most two below floor(x / q), so the
// remainder x - t*q is below 3q and two conditional subtractions finish the
// reduction. q must be below 2^31. Purely combinational; the ALU butterfly
// and the roots generator register around it.
// The description names Barrett reduction on the V*r path of the butterfly;
// the 62-bit shift, the run-time constant mu and q < 2^31 are this design's
// choices.
module barrett_reduce #(
  parameter int unsigned W    = 32,  // residue width
  parameter int unsigned MU_W = 64   // width of the Barrett constant
) (
  input  logic [2*W-1:0]  x,   // value to reduce, below q^2
  input  logic [W-1:0]    q,   // modulus, below 2^(W-1)
  input  logic [MU_W-1:0] mu,  // floor(2^(2W-2) / q)
  output logic [W-1:0]    r    // x mod q
);

  localparam int unsigned SH = 2*W - 2;

  logic [2*W+MU_W-1:0] xmu;
  logic [2*W-1:0]      t;
  logic [2*W-1:0]      tq;
  logic [W+1:0]        r0, r1, r2;

  always_comb begin
    xmu = {{MU_W{1'b0}}, x} * {{(2*W){1'b0}}, mu};
    t   = xmu[SH +: 2*W];
    tq  = t * {{W{1'b0}}, q};
    r0  = x[W+1:0] - tq[W+1:0];          // true value is below 3q < 2^(W+1)
    r1  = (r0 >= {2'b00, q}) ? r0 - {2'b00, q} : r0;
    r2  = (r1 >= {2'b00, q}) ? r1 - {2'b00, q} : r1;
    r   = r2[W-1:0];
  end

  // bits outside the quotient window and above the remainder range
  logic unused_bits;
  assign unused_bits = ^{xmu, tq, r2};

endmodule
