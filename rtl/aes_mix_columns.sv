// aes_mix_columns - MixColumns step of AES, combinational.
//
// Each column (a0..a3) is multiplied over GF(2^8) by the circulant matrix
// [2 3 1 1]: b_r = 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3), indices mod 4.
// Multiplication by 2 is xtime and by 3 is xtime(a) ^ a, so the block is only
// shifts and XORs. Ports: state_i in, state_o out, 128 bits, no latency.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        byte_t a0, a1, a2, a3;
        a0 = get_byte(state_i, 4*c + r);
        a1 = get_byte(state_i, 4*c + (r + 1) % 4);
        a2 = get_byte(state_i, 4*c + (r + 2) % 4);
        a3 = get_byte(state_i, 4*c + (r + 3) % 4);
        state_o[127 - 8*(4*c + r) -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      end
    end
  end

endmodule
