// aes_round - one complete AES round, combinational.
//
// The steps run in the order SubBytes, ShiftRows, MixColumns, AddRoundKey.
// With HAS_MIX = 0 MixColumns is left out, which gives the final (tenth)
// round. The unrolled core chains nine full rounds and one final round of
// this block with no register in between.
//
// Ports: state_i and round_key_i in, state_o out, 128 bits each, no latency.
module aes_round
  import aes_pkg::*;
#(
  parameter bit HAS_MIX = 1'b1
) (
  input  block_t state_i,
  input  block_t round_key_i,
  output block_t state_o
);

  block_t ss, mixed;

  aes_sub_shift u_sub_shift (.state_i(state_i), .state_o(ss));

  if (HAS_MIX) begin : g_mix
    aes_mix_columns u_mix (.state_i(ss), .state_o(mixed));
  end else begin : g_nomix
    assign mixed = ss;
  end

  aes_add_round_key u_ark (.state_i(mixed), .round_key_i(round_key_i), .state_o(state_o));

endmodule
