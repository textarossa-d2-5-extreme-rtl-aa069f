// SHAKE core: the sponge construction around Keccak-f[1600].
//
// A 1600-bit state register feeds one combinational Keccak round
// (keccak_round); its output is written back every clock, so a permutation
// takes 24 cycles. In front of the round a multiplexer chooses between
//   - the state register itself (rounds 2..24, and squeeze permutations), and
//   - the padded block XORed into the state, or into all zeros for the first
//     block of a message ("first"), which replaces an explicit state clear.
// The rate part of the state, truncated to 1344 bits (SHAKE-128) or 1088
// bits (SHAKE-256, upper bits zero), is offered on trunc_out for the data
// register.
//
// Interface: a one-cycle absorb pulse (with block, first) or squeeze pulse
// while busy is low starts a permutation; done pulses in the cycle after the
// 24th round, 24 cycles after the start pulse, when trunc_out is valid.
// Structure (padder, XOR, zero mux, round logic, state register, TRUNC)
// follows the description's core diagram; the one-round-per-cycle schedule
// is this design's choice.
module shake_core
  import shake_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  shake_mode_e       mode,
  input  logic              absorb,     // start: XOR block, then permute
  input  logic              first,      // with absorb: XOR into zero state
  input  logic [DREG_W-1:0] block,      // padded block, bits above the rate zero
  input  logic              squeeze,    // start: permute the state only
  output logic              busy,
  output logic              done,
  output logic [DREG_W-1:0] trunc_out
);

  logic [1599:0] state, round_in, round_out, xor_src;
  logic [4:0]    rnd;
  logic          starting;

  assign starting = !busy && (absorb || squeeze);

  always_comb begin
    xor_src  = first ? '0 : state;                    // zero multiplexer
    if (!busy && absorb) round_in = xor_src ^ {256'd0, block};
    else                 round_in = state;
  end

  keccak_round u_round (
    .state_in (round_in),
    .rc       (round_constant(busy ? rnd : 5'd0)),
    .state_out(round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      rnd   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (starting) begin
        state <= round_out;
        rnd   <= 5'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        state <= round_out;
        if (rnd == 5'(KECCAK_ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          rnd  <= '0;
        end else begin
          rnd <= rnd + 5'd1;
        end
      end
    end
  end

  // TRUNC: first r bits of the state
  always_comb begin
    trunc_out = state[DREG_W-1:0];
    if (mode == SHAKE256) trunc_out[DREG_W-1:RATE256] = '0;
  end

endmodule
