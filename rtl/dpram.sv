// True dual-port synchronous RAM.
//
// Used for the two polynomial memories (DPRAM1, DPRAM2), the memory shared
// with the host processor or DMA (shared DPRAM) and the Roots RAM of the
// RLWE accelerator. Each port can read or write one word per clock. Reads
// are synchronous with one cycle of latency and return the old contents when
// the same port writes the same address (read-first). When both ports write
// one address in the same cycle port B wins; the controller never does that.
// The description gives the memories and their sizes; the read-first,
// one-cycle behaviour is this design's choice, matching FPGA block RAM.
module dpram #(
  parameter int unsigned DEPTH  = 16384,
  parameter int unsigned WIDTH  = 32,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
