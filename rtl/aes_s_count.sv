// aes_s_count - the S_count shift register of the pipelined AES cores.
//
// A CPS-bit one-hot ring that rotates left by one position every clock. Bit
// CPS-1 set marks a load cycle: on the edge that ends it, every main round
// takes a new block from its predecessor. Bit p set means that the stages hold
// a block that has gone through p of their CPS passes; phase_o gives p in
// binary so the parent can choose the round key.
//
// CPS is 4 for a 32-bit bus and 2 for a 64-bit bus: a 128-bit block takes CPS
// bus transfers, so each stage keeps a block for CPS clocks. Synchronous
// active-low reset puts the ring in its load position.
module aes_s_count #(
  parameter int unsigned CPS = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [CPS-1:0]         s_count_o,
  output logic [$clog2(CPS)-1:0] phase_o
);

  initial assert (CPS >= 2) else $error("aes_s_count: CPS must be at least 2");

  logic [CPS-1:0] ring_q;

  always_ff @(posedge clk) begin
    if (!rst_n) ring_q <= {1'b1, {(CPS-1){1'b0}}};
    else        ring_q <= {ring_q[CPS-2:0], ring_q[CPS-1]};
  end

  always_comb begin
    phase_o = '0;
    for (int i = 0; i < CPS; i++)
      if (ring_q[i]) phase_o = ($clog2(CPS))'(i);
  end

  assign s_count_o = ring_q;

  property p_onehot;
    @(posedge clk) disable iff (!rst_n) $onehot(ring_q);
  endproperty
  a_onehot: assert property (p_onehot);

endmodule
