// Testbench of keccak_round: one round on a patterned state with the round
// constant of round 5, and the full 24-round permutation of the all-zero
// state obtained by feeding the output back, both against published-value
// vectors of Keccak-f[1600] (first lane of the zero permutation F1258F79...).
module tb_keccak_round;
  import shake_pkg::*;
  logic [1599:0] state_in, state_out;
  logic [63:0]   rc;
  int checks = 0, failures = 0;

  keccak_round dut (.*);

  localparam logic [63:0] ZERO_PERM [25] = '{
    64'hf1258f7940e1dde7, 64'h84d5ccf933c0478a, 64'hd598261ea65aa9ee, 64'hbd1547306f80494d,
    64'h8b284e056253d057, 64'hff97a42d7f8e6fd4, 64'h90fee5a0a44647c4, 64'h8c5bda0cd6192e76,
    64'had30a6f71b19059c, 64'h30935ab7d08ffc64, 64'heb5aa93f2317d635, 64'ha9a6e6260d712103,
    64'h81a57c16dbcf555f, 64'h43b831cd0347c826, 64'h01f22f1a11a5569f, 64'h05e5635a21d9ae61,
    64'h64befef28cc970f2, 64'h613670957bc46611, 64'hb87c5a554fd00ecb, 64'h8c3ee88a1ccf32c8,
    64'h940c7922ae3a2614, 64'h1841f924a2c509e4, 64'h16f53526e70465c2, 64'h75f644e97f30a13b,
    64'heaf1ff7b5ceca249};
  localparam logic [63:0] PAT_ROUND5 [25] = '{
    64'h53dcffee6a479e55, 64'hbc6917e90580bf0f, 64'ha45bc89c368596f4, 64'h08451bc762462e85,
    64'h6b3ab204efff42a4, 64'h79f9a019224630ef, 64'hd785162fcf803822, 64'h0b6743cbd68e0078,
    64'h1969e14d940b82f7, 64'h66eadb900682d9ae, 64'hb6486664701dab84, 64'h1b59fdea4a7c9d81,
    64'h0178a2c73d1fd7e2, 64'h3bf74018b8bde786, 64'h8e18d28d55000c6c, 64'hfacced8c0d9b4552,
    64'hb5664f31d0072f8e, 64'h50d59d9219379e37, 64'h600a6d30b3c8d191, 64'h421b469ead9300e1,
    64'h854f647bef5cbd20, 64'hbd1c39b9767cd7cd, 64'h62965de1e591059c, 64'h1f93361ff79943b6,
    64'h29c527e79e4d7683};

  initial begin
    // lane i of the pattern is 0x0123456789ABCDEF * (i+1) mod 2^64
    for (int i = 0; i < 25; i++) state_in[64*i +: 64] = 64'h0123456789ABCDEF * 64'(i + 1);
    rc = round_constant(5'd5);
    #1;
    for (int i = 0; i < 25; i++) begin
      checks++;
      if (state_out[64*i +: 64] != PAT_ROUND5[i]) begin
        failures++; $display("round 5 lane %0d: %h", i, state_out[64*i +: 64]);
      end
    end
    state_in = '0;
    for (int r = 0; r < 24; r++) begin
      rc = round_constant(5'(r));
      #1;
      state_in = state_out;
    end
    for (int i = 0; i < 25; i++) begin
      checks++;
      if (state_in[64*i +: 64] != ZERO_PERM[i]) begin
        failures++; $display("zero permutation lane %0d: %h", i, state_in[64*i +: 64]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
