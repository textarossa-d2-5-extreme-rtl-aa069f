// SHAKE padder: applies the XOF domain suffix and pad10*1 to a message block.
//
// The block arrives from the data register with its first byte in bits 7:0.
// For a block that is not the last one the padder passes it through. For the
// last block, bytes at positions >= nbytes are cleared, byte nbytes is
// XORed with 0x1F (SHAKE suffix 1111 followed by the first padding bit) and
// the last byte of the rate (167 for SHAKE-128, 135 for SHAKE-256) with 0x80;
// when nbytes is rate-1 both land in one byte, giving 0x9F. Bits above the
// rate are cleared. nbytes must be below the rate in bytes: a message whose
// length is a multiple of the rate ends with an extra block with nbytes = 0.
// Combinational. The description names the padder; the byte-granular
// interface is this design's choice, the padding rule is the standard's.
module shake_padder
  import shake_pkg::*;
(
  input  logic [DREG_W-1:0] block_in,
  input  shake_mode_e       mode,
  input  logic              last,
  input  logic [7:0]        nbytes,   // valid bytes in the last block
  output logic [DREG_W-1:0] block_out
);

  localparam int unsigned NB = DREG_W / 8;  // 168 bytes

  logic [7:0] rate_bytes;
  assign rate_bytes = (mode == SHAKE256) ? 8'(RATE256/8) : 8'(RATE128/8);

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      logic [7:0] byte_v;
      byte_v = block_in[8*i +: 8];
      if (i >= int'(rate_bytes)) byte_v = 8'h00;
      if (last) begin
        if (i >  int'(nbytes)) byte_v = 8'h00;
        if (i == int'(nbytes)) byte_v = 8'h1F;
        if (i == int'(rate_bytes) - 1) byte_v = byte_v | 8'h80;
      end
      block_out[8*i +: 8] = byte_v;
    end
  end

endmodule
