// tb_aes_sca_top - end-to-end test of the top with all three cores at their
// default sizes.
//
// Each core gets its own aes_stream_agent and, in parallel: the known-answer
// vectors with key changes, then a stream of N_BLOCKS random plaintexts under
// the key 2b7e151628aed2a6abf7158809cf4f3c (by default 500,000, the size of
// the power-trace collection workload of the original design), first back to back and then with random gaps, and
// finally a key change and a few more blocks. Every ciphertext is compared
// with the behavioural reference; latency and stream rate are checked by the
// agents.
//
// The testbench also counts how often each mechanism of the pipelined cores
// happened and fails if one never did: a stage handing its block to the next
// (per stage), a main round iterating on its own R_out, the last main round
// holding its block through M_out, all stages busy at once, a bubble moving
// through the pipeline, the input stalled by a full plaintext register or by
// a key expansion, and for the unrolled core a single-clock encryption.
`include "aes_kat_seq.svh"
module tb_aes_sca_top;
  // Random blocks per core; +blocks=N on the command line overrides it.
  int N_BLOCKS = 500000;
  initial void'($value$plusargs("blocks=%d", N_BLOCKS));

  logic clk = 0, rst_n = 0;
  logic p32_kl, p32_kr, p32_iv, p32_ir, p32_ov;
  logic [127:0] p32_k;
  logic [31:0] p32_id, p32_od;
  logic p64_kl, p64_kr, p64_iv, p64_ir, p64_ov;
  logic [127:0] p64_k;
  logic [63:0] p64_id, p64_od;
  logic unr_kl, unr_kr, unr_iv, unr_ir, unr_ov;
  logic [127:0] unr_k;
  logic [31:0] unr_id, unr_od;
  int checks = 0, failures = 0;

  aes_sca_top dut (
    .clk(clk), .rst_n(rst_n),
    .p32_key_load(p32_kl), .p32_key(p32_k), .p32_key_ready(p32_kr),
    .p32_in_valid(p32_iv), .p32_in_data(p32_id), .p32_in_ready(p32_ir),
    .p32_out_valid(p32_ov), .p32_out_data(p32_od),
    .p64_key_load(p64_kl), .p64_key(p64_k), .p64_key_ready(p64_kr),
    .p64_in_valid(p64_iv), .p64_in_data(p64_id), .p64_in_ready(p64_ir),
    .p64_out_valid(p64_ov), .p64_out_data(p64_od),
    .unr_key_load(unr_kl), .unr_key(unr_k), .unr_key_ready(unr_kr),
    .unr_in_valid(unr_iv), .unr_in_data(unr_id), .unr_in_ready(unr_ir),
    .unr_out_valid(unr_ov), .unr_out_data(unr_od));

  aes_stream_agent #(.BUS_W(32), .LAT_MIN(14), .LAT_MAX(17), .NAME("p32")) a32 (
    .clk(clk), .rst_n(rst_n), .key_load(p32_kl), .key(p32_k), .key_ready(p32_kr), .in_valid(p32_iv),
    .in_data(p32_id), .in_ready(p32_ir), .out_valid(p32_ov), .out_data(p32_od));
  aes_stream_agent #(.BUS_W(64), .LAT_MIN(12), .LAT_MAX(13), .NAME("p64")) a64 (
    .clk(clk), .rst_n(rst_n), .key_load(p64_kl), .key(p64_k), .key_ready(p64_kr), .in_valid(p64_iv),
    .in_data(p64_id), .in_ready(p64_ir), .out_valid(p64_ov), .out_data(p64_od));
  aes_stream_agent #(.BUS_W(32), .LAT_MIN(2), .LAT_MAX(2), .NAME("unrolled")) au (
    .clk(clk), .rst_n(rst_n), .key_load(unr_kl), .key(unr_k), .key_ready(unr_kr), .in_valid(unr_iv),
    .in_data(unr_id), .in_ready(unr_ir), .out_valid(unr_ov), .out_data(unr_od));

  always #5 clk = ~clk;

  // ------------------------------------------------------------ mechanism counters
  int p32_handoff [3];
  int p64_handoff [5];
  int p32_iter = 0, p64_iter = 0, p32_hold = 0, p64_hold = 0;
  int p32_full = 0, p64_full = 0, p32_bubble = 0, p64_bubble = 0;
  int p32_key_stall = 0, p64_key_stall = 0, unr_key_stall = 0, unr_single = 0;

  initial begin
    foreach (p32_handoff[i]) p32_handoff[i] = 0;
    foreach (p64_handoff[i]) p64_handoff[i] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_p32.load) begin
      for (int i = 0; i < 3; i++) if (dut.u_p32.v_in[i]) p32_handoff[i]++;
      if (!dut.u_p32.v_in[0] && dut.u_p32.v_q != 0) p32_bubble++;
    end else begin
      if (dut.u_p32.g_stage[0].en || dut.u_p32.g_stage[1].en) p32_iter++;
      if (dut.u_p32.g_stage[2].en) p32_hold++;
    end
    if (dut.u_p64.load) begin
      for (int i = 0; i < 5; i++) if (dut.u_p64.v_in[i]) p64_handoff[i]++;
      if (!dut.u_p64.v_in[0] && dut.u_p64.v_q != 0) p64_bubble++;
    end else begin
      if (dut.u_p64.g_stage[0].en || dut.u_p64.g_stage[3].en) p64_iter++;
      if (dut.u_p64.g_stage[4].en) p64_hold++;
    end
    if (&dut.u_p32.v_q) p32_full++;
    if (&dut.u_p64.v_q) p64_full++;
    if (!p32_kr && p32_iv) p32_key_stall++;
    if (!p64_kr && p64_iv) p64_key_stall++;
    if (!unr_kr && unr_iv) unr_key_stall++;
    if (dut.u_unr.take) unr_single++;
  end

  task automatic need(int count, string what);
    checks++;
    $display("  %-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  task automatic report();
    $display("mechanisms:");
    for (int i = 0; i < 3; i++) need(p32_handoff[i], $sformatf("p32 stage %0d takes a block", i));
    for (int i = 0; i < 5; i++) need(p64_handoff[i], $sformatf("p64 stage %0d takes a block", i));
    need(p32_iter, "p32 main round iterates on R_out");
    need(p64_iter, "p64 main round iterates on R_out");
    need(p32_hold, "p32 last stage holds through M_out");
    need(p64_hold, "p64 last stage holds through M_out");
    need(p32_full, "p32 three blocks in flight");
    need(p64_full, "p64 five blocks in flight");
    need(p32_bubble, "p32 bubble in the pipeline");
    need(p64_bubble, "p64 bubble in the pipeline");
    need(a32.stalls, "p32 input stalled (register full or key)");
    need(a64.stalls, "p64 input stalled (register full or key)");
    need(p32_key_stall + p64_key_stall + unr_key_stall, "input waiting for key expansion");
    need(au.stalls, "unrolled input stalled");
    need(unr_single, "unrolled single-clock encryptions");
    need(a32.contiguous + a64.contiguous + au.contiguous, "blocks in back-to-back streams");
    need(a32.key_loads + a64.key_loads + au.key_loads, "key loads");
    checks   += a32.checks + a64.checks + au.checks;
    failures += a32.failures + a64.failures + au.failures;
    $display("blocks out: p32 %0d, p64 %0d, unrolled %0d", a32.blocks_out, a64.blocks_out, au.blocks_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (40 * N_BLOCKS + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  // one core's whole run; the input is offered during key expansion once to
  // exercise that stall
  `define CORE_RUN(AG, IV) \
    `AES_KAT_SEQ(AG) \
    AG.load_key(128'h2b7e151628aed2a6abf7158809cf4f3c); \
    for (int n = 0; n < N_BLOCKS; n++) AG.send_ref(aes_ref_pkg::rand128(), n >= N_BLOCKS / 2); \
    AG.drain(); \
    fork \
      AG.load_key(aes_ref_pkg::rand128()); \
      begin @(negedge clk); @(negedge clk); IV = 1; @(negedge clk); IV = 0; end \
    join \
    for (int n = 0; n < 20; n++) AG.send_ref(aes_ref_pkg::rand128(), 0); \
    AG.drain();

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin `CORE_RUN(a32, a32.in_valid) end
      begin `CORE_RUN(a64, a64.in_valid) end
      begin `CORE_RUN(au,  au.in_valid)  end
    join
    repeat (20) @(posedge clk);
    checks++;
    if (a32.blocks_out != a32.blocks_in || a64.blocks_out != a64.blocks_in || au.blocks_out != au.blocks_in) begin
      failures++;
      $display("FAIL block counts differ");
    end
    report();
    $finish;
  end
endmodule
