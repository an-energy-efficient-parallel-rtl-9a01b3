// tb_aes_pipelined - end-to-end test of the pipelined core at both bus widths.
//
// Two instances, BUS_W = 32 (3 stages, a block every 4 clocks) and
// BUS_W = 64 (5 stages, a block every 2 clocks), each driven by an
// aes_stream_agent. Each runs the known-answer vectors (FIPS-197, SP 800-38A,
// GFSbox) with key changes in between, then 200 random blocks back to back
// under a random key and 60 with random gaps, all compared with the
// behavioural reference. The agents check the latency (last plaintext word to
// first ciphertext word: 14..17 clocks for 32 bits, 12..13 for 64, measured
// between sampling edges, and the minimum for blocks in a stream) and that
// a stream delivers one block every 4 (2) clocks. The testbench also checks
// that in_ready is low before a key has been loaded.
`include "aes_kat_seq.svh"
module tb_aes_pipelined;
  logic clk = 0, rst_n = 0;

  logic p32_kl, p32_kr, p32_iv, p32_ir, p32_ov;
  logic [127:0] p32_k;
  logic [31:0] p32_id, p32_od;
  logic p64_kl, p64_kr, p64_iv, p64_ir, p64_ov;
  logic [127:0] p64_k;
  logic [63:0] p64_id, p64_od;
  int checks = 0, failures = 0;

  aes_pipelined #(.BUS_W(32)) dut32 (
    .clk(clk), .rst_n(rst_n), .key_load_i(p32_kl), .key_i(p32_k), .key_ready_o(p32_kr),
    .in_valid_i(p32_iv), .in_data_i(p32_id), .in_ready_o(p32_ir),
    .out_valid_o(p32_ov), .out_data_o(p32_od));
  aes_pipelined #(.BUS_W(64)) dut64 (
    .clk(clk), .rst_n(rst_n), .key_load_i(p64_kl), .key_i(p64_k), .key_ready_o(p64_kr),
    .in_valid_i(p64_iv), .in_data_i(p64_id), .in_ready_o(p64_ir),
    .out_valid_o(p64_ov), .out_data_o(p64_od));

  aes_stream_agent #(.BUS_W(32), .LAT_MIN(14), .LAT_MAX(17), .NAME("p32")) a32 (
    .clk(clk), .rst_n(rst_n), .key_load(p32_kl), .key(p32_k), .key_ready(p32_kr), .in_valid(p32_iv),
    .in_data(p32_id), .in_ready(p32_ir), .out_valid(p32_ov), .out_data(p32_od));
  aes_stream_agent #(.BUS_W(64), .LAT_MIN(12), .LAT_MAX(13), .NAME("p64")) a64 (
    .clk(clk), .rst_n(rst_n), .key_load(p64_kl), .key(p64_k), .key_ready(p64_kr), .in_valid(p64_iv),
    .in_data(p64_id), .in_ready(p64_ir), .out_valid(p64_ov), .out_data(p64_od));

  always #5 clk = ~clk;

  task automatic report();
    checks   = a32.checks + a64.checks + checks;
    failures = a32.failures + a64.failures + failures;
    $display("p32: blocks %0d in %0d out, %0d in a stream, stalls %0d; p64: blocks %0d in %0d out, %0d in a stream, stalls %0d",
             a32.blocks_in, a32.blocks_out, a32.contiguous, a32.stalls,
             a64.blocks_in, a64.blocks_out, a64.contiguous, a64.stalls);
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
    checks += 2;
    if (p32_ir !== 1'b0 || p64_ir !== 1'b0) begin
      failures++;
      $display("FAIL in_ready high before a key was loaded");
    end
    if (p32_ov !== 1'b0 || p64_ov !== 1'b0) begin
      failures++;
      $display("FAIL output valid after reset");
    end
    fork
      begin
        `AES_KAT_SEQ(a32)
        a32.load_key(aes_ref_pkg::rand128());
        for (int n = 0; n < 200; n++) a32.send_ref(aes_ref_pkg::rand128(), 0);
        for (int n = 0; n < 60; n++)  a32.send_ref(aes_ref_pkg::rand128(), 1);
        a32.drain();
      end
      begin
        `AES_KAT_SEQ(a64)
        a64.load_key(aes_ref_pkg::rand128());
        for (int n = 0; n < 200; n++) a64.send_ref(aes_ref_pkg::rand128(), 0);
        for (int n = 0; n < 60; n++)  a64.send_ref(aes_ref_pkg::rand128(), 1);
        a64.drain();
      end
    join
    repeat (20) @(posedge clk);
    checks += 2;
    if (a32.blocks_out != a32.blocks_in || a64.blocks_out != a64.blocks_in) begin
      failures++;
      $display("FAIL block count");
    end
    if (a32.contiguous < 100 || a64.contiguous < 100) begin
      failures++;
      $display("FAIL too few back-to-back blocks");
    end
    report();
    $finish;
  end
endmodule
