// tb_aes_unrolled - end-to-end test of the unrolled core (32-bit bus).
//
// An aes_stream_agent runs the known-answer vectors (FIPS-197, SP 800-38A,
// GFSbox) with key changes, then 200 random blocks back to back and 60 with
// random gaps, compared with the behavioural reference. The encryption itself
// takes one clock: the first ciphertext word must follow the last plaintext
// word by exactly 2 sampling edges (accept edge, encrypt edge), and a stream
// must deliver one block every 4 clocks.
`include "aes_kat_seq.svh"
module tb_aes_unrolled;
  logic clk = 0, rst_n = 0;
  logic kl, kr, iv, ir, ov;
  logic [127:0] k;
  logic [31:0] id, od;
  int checks = 0, failures = 0;

  aes_unrolled dut (
    .clk(clk), .rst_n(rst_n), .key_load_i(kl), .key_i(k), .key_ready_o(kr),
    .in_valid_i(iv), .in_data_i(id), .in_ready_o(ir), .out_valid_o(ov), .out_data_o(od));

  aes_stream_agent #(.BUS_W(32), .LAT_MIN(2), .LAT_MAX(2), .NAME("unrolled")) ag (
    .clk(clk), .rst_n(rst_n), .key_load(kl), .key(k), .key_ready(kr), .in_valid(iv),
    .in_data(id), .in_ready(ir), .out_valid(ov), .out_data(od));

  always #5 clk = ~clk;

  task automatic report();
    checks   += ag.checks;
    failures += ag.failures;
    $display("blocks %0d in %0d out, %0d in a stream, stalls %0d",
             ag.blocks_in, ag.blocks_out, ag.contiguous, ag.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ir !== 1'b0) begin failures++; $display("FAIL in_ready high before a key"); end
    `AES_KAT_SEQ(ag)
    ag.load_key(aes_ref_pkg::rand128());
    for (int n = 0; n < 200; n++) ag.send_ref(aes_ref_pkg::rand128(), 0);
    for (int n = 0; n < 60; n++)  ag.send_ref(aes_ref_pkg::rand128(), 1);
    ag.drain();
    repeat (10) @(posedge clk);
    checks += 2;
    if (ag.blocks_out != ag.blocks_in) begin failures++; $display("FAIL block count"); end
    if (ag.contiguous < 100) begin failures++; $display("FAIL too few back-to-back blocks"); end
    report();
    $finish;
  end
endmodule
