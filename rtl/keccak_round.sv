// One round of the Keccak-f[1600] permutation, purely combinational.
//
// Applies the five step mappings theta, rho, pi, chi and iota in that order
// to a 1600-bit state (lane (x, y) at bits 64*(x+5y) +: 64) and adds the
// round constant rc in iota. The SHAKE core registers its output, so one
// round takes one clock cycle and a permutation 24 cycles. The step mappings
// are those of the SHA-3 standard, which the description cites.
module keccak_round
  import shake_pkg::*;
(
  input  logic [1599:0] state_in,
  input  logic [63:0]   rc,
  output logic [1599:0] state_out
);

  function automatic logic [63:0] rotl(input logic [63:0] v, input int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  logic [63:0] a [25];
  logic [63:0] b [25];
  logic [63:0] c [5];
  logic [63:0] d [5];

  always_comb begin
    for (int i = 0; i < 25; i++) a[i] = state_in[64*i +: 64];
    // theta
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // rho and pi: B[y, 2x+3y] = rot(A[x, y], r[x, y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], rho_offset(x + 5*y));
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    a[0] = a[0] ^ rc;
    for (int i = 0; i < 25; i++) state_out[64*i +: 64] = a[i];
  end

endmodule
