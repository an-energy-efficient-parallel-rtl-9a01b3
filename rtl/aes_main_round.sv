// aes_main_round - one stage of the pipelined AES cores.
//
// A 2-to-1 multiplexer chooses the next content of a 128-bit state register:
// in1_i (the block handed on by the previous stage) when sel_i is 1, in0_i
// (a feedback input) when sel_i is 0. sel_i comes from the S_count shift
// register. The register output is brought out as m_out_o. Behind the register
// the round logic runs combinationally in the order AddRoundKey,
// SubBytes/ShiftRows, MixColumns and gives r_out_o:
//
//   r_out_o = MixColumns(ShiftRows(SubBytes(m_out_o ^ round_key_i)))
//
// AddRoundKey comes first here (in a plain round it comes last), so a chain of
// main rounds starting from the plaintext computes rounds 1, 2, ... each
// missing its final key addition, which the next pass supplies.
//
// The parent chooses what feeds in0_i: its own r_out_o to compute another
// round in the next clock, or its own m_out_o to hold the state (used by the
// last stage, which computes a single round but stays CPS clocks). en_i is a
// load enable that freezes the register when the stage holds no data, to
// save switching activity.
//
// Timing: the register loads on the rising clock edge; r_out_o follows
// m_out_o and round_key_i combinationally. Synchronous active-low reset
// clears the register.
module aes_main_round
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en_i,
  input  logic   sel_i,
  input  block_t in0_i,
  input  block_t in1_i,
  input  block_t round_key_i,
  output block_t m_out_o,
  output block_t r_out_o
);

  block_t mux_o, state_q, ark, ss;

  assign mux_o = sel_i ? in1_i : in0_i;

  always_ff @(posedge clk) begin
    if (!rst_n)    state_q <= '0;
    else if (en_i) state_q <= mux_o;
  end

  assign m_out_o = state_q;

  aes_add_round_key u_ark (.state_i(state_q), .round_key_i(round_key_i), .state_o(ark));
  aes_sub_shift     u_ss  (.state_i(ark), .state_o(ss));
  aes_mix_columns   u_mix (.state_i(ss), .state_o(r_out_o));

endmodule
