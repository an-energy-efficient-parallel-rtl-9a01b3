// aes_pt_collector - input side of the AES cores: bus words to a 128-bit block.
//
// Words of BUS_W bits arrive with a valid/ready handshake and are shifted into
// the 128-bit plaintext register, first word in the most significant bits.
// After 128/BUS_W words full_o is high and block_o holds the plaintext. The
// core takes it by raising take_i; in that same clock the collector already
// accepts the first word of the next block, so a sender that keeps in_valid_i
// high fills one block every 128/BUS_W clocks with no gap.
//
// in_ready_o = en_i & (!full_o | take_i). en_i lets the core stop input while
// its round keys are being computed. Synchronous active-low reset empties the
// register. The bus width follows the core (32 or 64 bits); the handshake is
// this design's choice.
module aes_pt_collector
  import aes_pkg::*;
#(
  parameter int unsigned BUS_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_i,
  input  logic             in_valid_i,
  input  logic [BUS_W-1:0] in_data_i,
  output logic             in_ready_o,
  input  logic             take_i,
  output logic             full_o,
  output block_t           block_o
);

  localparam int unsigned WORDS = 128 / BUS_W;

  initial assert (BUS_W < 128 && 128 % BUS_W == 0)
    else $error("aes_pt_collector: BUS_W must divide 128 and be below it");

  block_t                   buf_q;
  logic [$clog2(WORDS):0]   cnt_q;
  logic                     accept, drain;

  assign full_o     = (cnt_q == ($clog2(WORDS)+1)'(WORDS));
  assign drain      = take_i && full_o;
  assign in_ready_o = en_i && (!full_o || take_i);
  assign accept     = in_valid_i && in_ready_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      if (accept) buf_q <= {buf_q[127-BUS_W:0], in_data_i};
      if (drain)       cnt_q <= accept ? 1 : 0;
      else if (accept) cnt_q <= cnt_q + 1'b1;
    end
  end

  assign block_o = buf_q;

endmodule
