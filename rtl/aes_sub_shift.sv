// aes_sub_shift - SubBytes followed by ShiftRows, combinational.
//
// SubBytes replaces each of the 16 bytes by its S-box value (the table is
// built in aes_pkg from the GF(2^8) inverse and affine map). ShiftRows then
// rotates row r of the 4x4 byte matrix left by r positions: output byte
// (r + 4c) takes input byte (r + 4((c + r) mod 4)).
//
// The two steps form one block, as in the pipelined main round, which shows
// them as a single "SubBytes / ShiftRows" box. Ports: state_i in, state_o out,
// 128 bits each, no latency.
module aes_sub_shift
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        state_o[127 - 8*(r + 4*c) -: 8] = sbox(get_byte(state_i, r + 4*((c + r) % 4)));
      end
    end
  end

endmodule
