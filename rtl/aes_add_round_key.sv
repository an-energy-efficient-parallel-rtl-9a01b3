// aes_add_round_key - AddRoundKey step of AES: the state is XORed bit by bit
// with the round key. Purely combinational, no latency.
//
// Ports: state_i and round_key_i (128 bits each, FIPS-197 byte order) in,
// state_o out. The step is the standard one; keeping it a module of its own
// mirrors the block structure of the round (SubBytes, ShiftRows, MixColumns,
// AddRoundKey) used throughout these cores.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  output block_t state_o
);

  assign state_o = state_i ^ round_key_i;

endmodule
