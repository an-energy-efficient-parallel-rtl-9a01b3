// aes_pipelined - pipelined AES-128 encryption core with a BUS_W-bit interface.
//
// The nine full rounds of AES-128 are spread over N_STAGES identical main
// rounds (aes_main_round). A block is taken in CPS = 128/BUS_W bus words, so
// each stage keeps a block for CPS clocks and applies one round per clock,
// feeding its R_out back into its register. All stages hand on their block at
// the same clock edge, chosen by the one-hot S_count ring (aes_s_count).
//
//   BUS_W = 32: CPS = 4, three stages doing 4 + 4 + 1 rounds, a block every 4
//               clocks;
//   BUS_W = 64: CPS = 2, five stages doing 2 + 2 + 2 + 2 + 1 rounds, a block
//               every 2 clocks.
//
// The last stage computes only one round but must also keep its block for
// CPS clocks. It therefore feeds its register output M_out, not R_out, back
// to its In0 input: between load edges it reloads its own state (the round
// logic is bypassed for those cycles) and R_out stays at the one round it
// computes. The combinational tail (aes_last_round) adds round key 9, applies
// SubBytes/ShiftRows and adds round key 10; the result is loaded into the
// ciphertext register at the next load edge and sent out in CPS words.
//
// Since a main round adds its key first, stage i uses round keys
// i*CPS .. i*CPS+CPS-1 (key i*CPS + phase in phase 0..CPS-1); the last stage
// uses key 8. Round keys come from aes_key_expansion after key_load_i.
//
// Interface: key_load_i/key_i start the key schedule; key_ready_o is high once
// it is done, and words are accepted only then. Plaintext words use a
// valid/ready handshake (aes_pt_collector), ciphertext words come out with
// out_valid_o and no back-pressure (aes_ct_serializer). A valid bit moves with
// each block; stages without a block keep their register still.
//
// Timing: the block that a load edge puts into stage 0 is loaded into the
// ciphertext register N_STAGES*CPS clocks later, and its first word is on
// out_data_o right after that edge (12 clocks for BUS_W = 32, 10 for 64).
// With input words every clock, a ciphertext word leaves every clock.
// The structure (stages, S_count, M_out/R_out, bus widths) follows the
// published pipelined design; the key schedule, handshakes, valid bits and
// the key order per stage are this design's own choices. Change the key only
// when no block is in flight; an assertion (a_key_idle) checks this.
module aes_pipelined
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

  localparam int unsigned CPS      = 128 / BUS_W;
  localparam int unsigned N_STAGES = (NR - 2) / CPS + 1;

  initial assert (BUS_W == 32 || BUS_W == 64)
    else $error("aes_pipelined: BUS_W must be 32 or 64");

  // ---------------------------------------------------------------- control
  logic [CPS-1:0]         s_count;
  logic [$clog2(CPS)-1:0] phase;
  logic                   load;

  aes_s_count #(.CPS(CPS)) u_s_count (
    .clk(clk), .rst_n(rst_n), .s_count_o(s_count), .phase_o(phase)
  );

  assign load = s_count[CPS-1];

  round_keys_t rk;
  logic        key_ready;

  aes_key_expansion u_key (
    .clk(clk), .rst_n(rst_n), .key_load_i(key_load_i), .key_i(key_i),
    .round_keys_o(rk), .ready_o(key_ready)
  );

  assign key_ready_o = key_ready;

  // ---------------------------------------------------------------- input
  logic   pt_full;
  block_t pt_block;

  aes_pt_collector #(.BUS_W(BUS_W)) u_in (
    .clk(clk), .rst_n(rst_n), .en_i(key_ready),
    .in_valid_i(in_valid_i), .in_data_i(in_data_i), .in_ready_o(in_ready_o),
    .take_i(load), .full_o(pt_full), .block_o(pt_block)
  );

  // ---------------------------------------------------------------- stages
  block_t                m_out [N_STAGES];
  block_t                r_out [N_STAGES];
  logic [N_STAGES-1:0]   v_q;      // stage holds a block
  logic [N_STAGES-1:0]   v_in;     // block offered to the stage at this load

  always_comb begin
    v_in[0] = pt_full;
    for (int i = 1; i < N_STAGES; i++) v_in[i] = v_q[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    v_q <= '0;
    else if (load) v_q <= v_in;
  end

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    block_t in0, in1, key;
    logic   en;

    assign in1 = (i == 0) ? pt_block : r_out[(i == 0) ? 0 : i - 1];
    if (i == N_STAGES - 1) begin : g_last
      assign in0 = m_out[i];                // hold: bypass the round logic
      assign key = rk[i * CPS];
    end else begin : g_mid
      assign in0 = r_out[i];                // iterate: one more round
      assign key = rk[i * CPS + int'(phase)];
    end
    assign en = load ? v_in[i] : v_q[i];

    aes_main_round u_round (
      .clk(clk), .rst_n(rst_n), .en_i(en), .sel_i(load),
      .in0_i(in0), .in1_i(in1), .round_key_i(key),
      .m_out_o(m_out[i]), .r_out_o(r_out[i])
    );
  end

  // ---------------------------------------------------------------- output
  block_t ct;

  aes_last_round u_last (
    .state_i(r_out[N_STAGES-1]), .key9_i(rk[NR-1]), .key10_i(rk[NR]), .state_o(ct)
  );

  aes_ct_serializer #(.BUS_W(BUS_W)) u_out (
    .clk(clk), .rst_n(rst_n), .load_i(load && v_q[N_STAGES-1]), .block_i(ct),
    .out_valid_o(out_valid_o), .out_data_o(out_data_o)
  );

  // A new key may only be loaded while no block is inside the core.
  a_key_idle: assert property (@(posedge clk) disable iff (!rst_n)
    key_load_i |-> (v_q == '0 && !pt_full))
    else $error("aes_pipelined: key_load_i while blocks are in flight");

endmodule
