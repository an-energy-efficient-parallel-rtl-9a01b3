// aes_key_expansion - AES-128 key schedule with a register file of round keys.
//
// On key_load_i the cipher key is stored as round key 0 and ready_o drops.
// In each of the next ten clocks one more round key is derived from the
// previous one with the FIPS-197 recurrence
//
//   t  = SubWord(RotWord(w3)) ^ (rcon << 24)
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
//
// where rcon starts at 0x01 and is multiplied by x each round. After the
// tenth, ready_o rises and round keys 0..10 stay on round_keys_o until the
// next key_load_i. The unit holds keys in registers because the cores encrypt
// long streams under one key; expanding once saves the per-block work.
//
// Timing: the edge that samples key_load_i stores key 0; each of the next ten
// edges stores one more key, and ready_o is high from the tenth of them on.
// Reset clears the keys and leaves ready_o low until a key is loaded.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load_i,
  input  block_t      key_i,
  output round_keys_t round_keys_o,
  output logic        ready_o
);

  round_keys_t rk_q;
  logic [3:0]  idx_q;     // next round key to compute, 1..10; 11 when done
  byte_t       rcon_q;
  logic        busy_q, ready_q;

  block_t prev, next;
  logic [31:0] t;

  assign prev = rk_q[idx_q - 4'd1];

  always_comb begin
    t = {sbox(prev[23:16]), sbox(prev[15:8]), sbox(prev[7:0]), sbox(prev[31:24])}
        ^ {rcon_q, 24'h0};
    next[127:96] = prev[127:96] ^ t;
    next[95:64]  = prev[95:64]  ^ next[127:96];
    next[63:32]  = prev[63:32]  ^ next[95:64];
    next[31:0]   = prev[31:0]   ^ next[63:32];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rk_q    <= '0;
      idx_q   <= 4'd1;
      rcon_q  <= 8'h01;
      busy_q  <= 1'b0;
      ready_q <= 1'b0;
    end else if (key_load_i) begin
      rk_q[0] <= key_i;
      idx_q   <= 4'd1;
      rcon_q  <= 8'h01;
      busy_q  <= 1'b1;
      ready_q <= 1'b0;
    end else if (busy_q) begin
      rk_q[idx_q] <= next;
      rcon_q      <= xtime(rcon_q);
      idx_q       <= idx_q + 4'd1;
      if (idx_q == 4'(NR)) begin
        busy_q  <= 1'b0;
        ready_q <= 1'b1;
      end
    end
  end

  assign round_keys_o = rk_q;
  assign ready_o      = ready_q;

endmodule
