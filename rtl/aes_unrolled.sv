// aes_unrolled - unrolled AES-128 encryption core with a BUS_W-bit interface.
//
// All rounds are separate combinational blocks with no register between
// them: the initial AddRoundKey, nine full rounds (SubBytes, ShiftRows,
// MixColumns, AddRoundKey) and the final round without MixColumns. The path
// runs from the 128-bit plaintext register to the 128-bit ciphertext register
// and completes in a single clock, so the clock period has to cover all ten
// rounds.
//
// Interface: key_load_i/key_i start the key schedule (aes_key_expansion);
// key_ready_o is high once the eleven round keys are stored, and words are
// accepted only then. Plaintext arrives as BUS_W-bit words with a valid/ready
// handshake (aes_pt_collector); ciphertext leaves as BUS_W-bit words with
// out_valid_o and no back-pressure (aes_ct_serializer).
//
// Timing: the edge after the last plaintext word is accepted encrypts the
// block and loads the ciphertext register; the first ciphertext word is on
// out_data_o right after that edge. With one input word per clock the core
// sustains one block every 128/BUS_W clocks. The unrolled structure and the
// 32-bit bus follow the published design; the key schedule and handshakes
// are this design's choices. Load a new key only while no plaintext block
// is waiting; an assertion (a_key_idle) checks this.
module aes_unrolled
  import aes_pkg::*;
#(
  parameter int unsigned BUS_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             key_load_i,
  input  block_t           key_i,
  output logic             key_ready_o,
  input  logic             in_valid_i,
  input  logic [BUS_W-1:0] in_data_i,
  output logic             in_ready_o,
  output logic             out_valid_o,
  output logic [BUS_W-1:0] out_data_o
);

  round_keys_t rk;
  logic        key_ready;

  aes_key_expansion u_key (
    .clk(clk), .rst_n(rst_n), .key_load_i(key_load_i), .key_i(key_i),
    .round_keys_o(rk), .ready_o(key_ready)
  );

  assign key_ready_o = key_ready;

  logic   pt_full, take;
  block_t pt_block;

  aes_pt_collector #(.BUS_W(BUS_W)) u_in (
    .clk(clk), .rst_n(rst_n), .en_i(key_ready),
    .in_valid_i(in_valid_i), .in_data_i(in_data_i), .in_ready_o(in_ready_o),
    .take_i(take), .full_o(pt_full), .block_o(pt_block)
  );

  assign take = pt_full && key_ready;

  // state[r] is the state after round r (state[0] after the first key addition)
  block_t state [NR+1];

  aes_add_round_key u_ark0 (.state_i(pt_block), .round_key_i(rk[0]), .state_o(state[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.HAS_MIX(r != NR)) u_round (
      .state_i(state[r-1]), .round_key_i(rk[r]), .state_o(state[r])
    );
  end

  aes_ct_serializer #(.BUS_W(BUS_W)) u_out (
    .clk(clk), .rst_n(rst_n), .load_i(take), .block_i(state[NR]),
    .out_valid_o(out_valid_o), .out_data_o(out_data_o)
  );

  // A new key may only be loaded while no plaintext block is waiting.
  a_key_idle: assert property (@(posedge clk) disable iff (!rst_n)
    key_load_i |-> !pt_full)
    else $error("aes_unrolled: key_load_i while a block is waiting");

endmodule
