// Constants of the SHAKE-128/256 accelerator.
//
// Keccak-f[1600] works on a 5x5 array of 64-bit lanes; lane (x, y) occupies
// bits 64*(x+5y) +: 64 of the 1600-bit state, and bytes of the message enter
// lane by lane, least significant byte first (FIPS 202 ordering).
// SHAKE-128 absorbs and squeezes r = 1344 bits per permutation, SHAKE-256
// r = 1088 bits; the capacity is 256 and 512 bits respectively. The rotation
// offsets and the 24 round constants are those of the SHA-3 standard.
package shake_pkg;

  localparam int unsigned KECCAK_B     = 1600;
  localparam int unsigned KECCAK_ROUNDS = 24;
  localparam int unsigned RATE128      = 1344;  // bits
  localparam int unsigned RATE256      = 1088;  // bits
  localparam int unsigned DREG_W       = 1344;  // data register width

  typedef enum logic {SHAKE128 = 1'b0, SHAKE256 = 1'b1} shake_mode_e;

  // rho rotation offset of lane (x, y), indexed [x + 5*y]
  function automatic int unsigned rho_offset(input int unsigned lane);
    int unsigned t [25] = '{ 0,  1, 62, 28, 27,
                            36, 44,  6, 55, 20,
                             3, 10, 43, 25, 39,
                            41, 45, 15, 21,  8,
                            18,  2, 61, 56, 14};
    return t[lane % 25];
  endfunction

  // iota round constant
  function automatic logic [63:0] round_constant(input logic [4:0] rnd);
    logic [63:0] rc [24] = '{
      64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
      64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
      64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
      64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
      64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
      64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};
    return (rnd < 5'd24) ? rc[rnd] : 64'd0;
  endfunction

endpackage
