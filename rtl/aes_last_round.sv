// aes_last_round - combinational tail of the pipelined AES cores.
//
// The main rounds leave the state of round 9 without its key addition. This
// block finishes the encryption: AddRoundKey with round key 9, SubBytes /
// ShiftRows, and AddRoundKey with round key 10 (the final round has no
// MixColumns). Ports: state_i, key9_i, key10_i in, state_o (ciphertext) out,
// 128 bits each, no latency.
module aes_last_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t key9_i,
  input  block_t key10_i,
  output block_t state_o
);

  block_t a9, ss;

  aes_add_round_key u_ark9  (.state_i(state_i), .round_key_i(key9_i),  .state_o(a9));
  aes_sub_shift     u_ss    (.state_i(a9),      .state_o(ss));
  aes_add_round_key u_ark10 (.state_i(ss),      .round_key_i(key10_i), .state_o(state_o));

endmodule
