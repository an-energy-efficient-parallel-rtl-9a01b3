// aes_ct_serializer - output side of the AES cores: a 128-bit block to bus
// words.
//
// load_i copies block_i into the 128-bit ciphertext register. The register is
// then sent out as 128/BUS_W words of BUS_W bits, most significant first, one
// per clock, each marked by out_valid_o. A load in the clock after the last
// word (or on top of an unfinished block) starts the next block at once, so
// loads every 128/BUS_W clocks give a gap-free output stream.
//
// There is no back-pressure: the cores produce at a fixed rate and the
// receiver must take every valid word (this design's choice). Synchronous
// active-low reset clears out_valid_o.
module aes_ct_serializer
  import aes_pkg::*;
#(
  parameter int unsigned BUS_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_i,
  input  block_t           block_i,
  output logic             out_valid_o,
  output logic [BUS_W-1:0] out_data_o
);

  localparam int unsigned WORDS = 128 / BUS_W;

  initial assert (BUS_W < 128 && 128 % BUS_W == 0)
    else $error("aes_ct_serializer: BUS_W must divide 128 and be below it");

  block_t                 sr_q;
  logic [$clog2(WORDS):0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr_q  <= '0;
      cnt_q <= '0;
    end else if (load_i) begin
      sr_q  <= block_i;
      cnt_q <= ($clog2(WORDS)+1)'(WORDS);
    end else if (cnt_q != 0) begin
      sr_q  <= {sr_q[127-BUS_W:0], {BUS_W{1'b0}}};
      cnt_q <= cnt_q - 1'b1;
    end
  end

  assign out_valid_o = (cnt_q != 0);
  assign out_data_o  = sr_q[127 -: BUS_W];

endmodule
