// Shared types and constants of the homomorphic-encryption (RLWE) accelerator.
//
// The accelerator computes the symmetric CKKS/RLWE ciphertext component
// c0 = -a*s + (m+e) in the NTT domain: it transforms s and (m+e) with a
// negacyclic number-theoretic transform and then forms
// NTT(m+e)[i] - a[i]*NTT(s)[i] mod q coefficient by coefficient. The package
// holds the coefficient width, the command codes written to the control
// register, the register map of the AXI4 slave and the select encodings of
// the datapath multiplexers (mux1..mux3) and output demultiplexers.
//
// The 32-bit coefficient width and the 16384 maximum degree follow the
// design description; the command codes, register offsets and encodings are
// this implementation's own choices.
package he_pkg;

  localparam int unsigned HE_COEF_W  = 32;  // coefficient width (bits)
  localparam int unsigned HE_MU_W   = 64;  // Barrett constant width
  localparam int unsigned HE_MAX_LOGN = 14; // log2 of the largest degree, 16384

  // Commands written to the CTRL register.
  typedef enum logic [2:0] {
    OP_NONE      = 3'd0,
    OP_GEN_ROOTS = 3'd1,  // fill the Roots RAM with psi^brv(i)
    OP_NTT_S     = 3'd2,  // shared DPRAM -> NTT -> DPRAM1 (secret key s)
    OP_NTT_ME    = 3'd3,  // shared DPRAM -> NTT -> DPRAM2 (plaintext m+e)
    OP_ENCRYPT   = 3'd4   // shared DPRAM (a) -> c0 = NTT(m+e) - a*NTT(s) -> shared DPRAM
  } he_op_e;

  // Source of the U and V butterfly operands (mux1, mux2).
  typedef enum logic [1:0] {
    SRC_SHARED = 2'd0,
    SRC_DP1    = 2'd1,
    SRC_DP2    = 2'd2
  } he_src_e;

  // Source of the multiplier operand R (mux3).
  typedef enum logic {
    R_ROOTS  = 1'b0,
    R_SHARED = 1'b1
  } he_rsrc_e;

  // Destination of the butterfly results (demux1, demux2).
  typedef enum logic [1:0] {
    DST_DP1    = 2'd0,
    DST_DP2    = 2'd1,
    DST_SHARED = 2'd2
  } he_dst_e;

  // Register map, 32-bit word index inside the register window
  // (byte address bit 17 set; bit 17 clear selects the shared DPRAM).
  localparam logic [2:0] REG_CTRL   = 3'd0;  // W: [2:0] command, starts it
  localparam logic [2:0] REG_STATUS = 3'd1;  // R: [0] busy, [1] done
  localparam logic [2:0] REG_LOGN   = 3'd2;  // RW: log2 of the polynomial degree
  localparam logic [2:0] REG_Q      = 3'd3;  // RW: modulus q (< 2^31)
  localparam logic [2:0] REG_MU_LO  = 3'd4;  // RW: floor(2^62/q) bits 31:0
  localparam logic [2:0] REG_MU_HI  = 3'd5;  // RW: floor(2^62/q) bits 63:32
  localparam logic [2:0] REG_PSI    = 3'd6;  // RW: primitive 2n-th root of unity

endpackage
