// Data register of the SHAKE accelerator: a 1344-bit shift register.
//
// Host writes enter at the top, one bus word at a time, and move everything
// down by DATA_W bits, so after a full SHAKE-128 block (1344 bits) the first
// word written sits in bits DATA_W-1:0. After a SHAKE-256 block (1088 bits)
// it sits at bit 256; the accelerator shifts the block down before padding.
// For output the register is loaded in parallel with the truncated state;
// each host read returns bits DATA_W-1:0 and shifts the register down by one
// word, so output words come out in byte-stream order. shift_in, shift_out
// and load are exclusive; load has priority. Reset clears the register.
// The 1344-bit width and its use for input and output follow the
// description; the shift directions are this design's choice.
module shake_data_reg
  import shake_pkg::*;
#(
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_in,
  input  logic [DATA_W-1:0] wdata,
  input  logic              shift_out,
  input  logic              load,
  input  logic [DREG_W-1:0] load_data,
  output logic [DATA_W-1:0] rdata,
  output logic [DREG_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= '0;
    else if (load)      q <= load_data;
    else if (shift_in)  q <= {wdata, q[DREG_W-1:DATA_W]};
    else if (shift_out) q <= {{DATA_W{1'b0}}, q[DREG_W-1:DATA_W]};
  end

  assign rdata = q[DATA_W-1:0];

endmodule
