// tb_aes_key_expansion - checks the key schedule: for the FIPS-197 key
// 2b7e1516... round key 1 must be a0fafe17... and round key 10 d014f9a8...;
// for that key and random keys all eleven round keys must match the
// behavioural reference, ready_o must drop on key_load_i and rise exactly ten
// clocks after the load edge, and the keys must stay put afterwards.
module tb_aes_key_expansion;
  import aes_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0, ready;
  block_t      key = '0;
  round_keys_t rk;
  int checks = 0, failures = 0;

  aes_key_expansion dut (
    .clk(clk), .rst_n(rst_n), .key_load_i(load), .key_i(key),
    .round_keys_o(rk), .ready_o(ready)
  );

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic expand(block_t k);
    int cycles = 0;
    @(negedge clk) begin load = 1; key = k; end
    @(posedge clk) #1 check(ready, 0, "ready low after load");
    @(negedge clk) load = 0;
    while (!ready) begin
      @(posedge clk) #1;
      cycles++;
    end
    check(cycles, 10, "expansion clocks");
    for (int r = 0; r <= 10; r++) check(rk[r], aes_ref_pkg::round_key(k, r), $sformatf("rk%0d", r));
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(ready, 0, "not ready after reset");
    rst_n = 1;
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(rk[1],  128'ha0fafe1788542cb123a339392a6c7605, "FIPS rk1");
    check(rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS rk10");
    repeat (5) @(posedge clk);
    #1 check(rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "keys stay");
    check(ready, 1, "ready stays");
    for (int n = 0; n < 10; n++) expand(aes_ref_pkg::rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
