// tb_aes_pt_collector - checks the word-to-block input register for 32- and
// 64-bit words: words land most significant first; full rises after 4 (2)
// words; in_ready is low while en is low, and while the block is full and not
// taken; when the consumer takes the block, the next block's first word is
// accepted in that same clock, so a continuous stream fills one block every
// 4 (2) clocks. The second half of the 32-bit stream has random gaps.
module tb_aes_pt_collector;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic v32 = 0, v64 = 0, take32 = 0, take64 = 0;
  logic [31:0] d32 = '0;
  logic [63:0] d64 = '0;
  logic rdy32, rdy64, full32, full64;
  block_t b32, b64;
  int checks = 0, failures = 0, cyc = 0;
  block_t q32 [$];
  block_t q64 [$];
  int got32 = 0, got64 = 0;

  aes_pt_collector #(.BUS_W(32)) dut32 (.clk(clk), .rst_n(rst_n), .en_i(en), .in_valid_i(v32),
    .in_data_i(d32), .in_ready_o(rdy32), .take_i(take32), .full_o(full32), .block_o(b32));
  aes_pt_collector #(.BUS_W(64)) dut64 (.clk(clk), .rst_n(rst_n), .en_i(en), .in_valid_i(v64),
    .in_data_i(d64), .in_ready_o(rdy64), .take_i(take64), .full_o(full64), .block_o(b64));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(full32, 0, "empty after reset");
    rst_n = 1;
    @(negedge clk) v32 = 1;
    #1 check(rdy32, 0, "not ready while en low");
    @(negedge clk) en = 1;
  end

  // Producers: drive a word at a falling edge, hold it until accepted.
  initial begin
    block_t blk;
    wait (en);
    for (int n = 0; n < 20; n++) begin
      blk = aes_ref_pkg::rand128();
      q32.push_back(blk);
      for (int w = 0; w < 4; w++) begin
        if (n >= 10) begin
          v32 = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        v32 = 1; d32 = blk[127 - 32*w -: 32];
        #1 while (!rdy32) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    end
    v32 = 0;
  end

  initial begin
    block_t blk;
    wait (en);
    for (int n = 0; n < 20; n++) begin
      blk = aes_ref_pkg::rand128();
      q64.push_back(blk);
      for (int w = 0; w < 2; w++) begin
        v64 = 1; d64 = blk[127 - 64*w -: 64];
        #1 while (!rdy64) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    end
    v64 = 0;
  end

  // 32-bit consumer: takes a full block at once, except block 3, which waits
  // three clocks so that in_ready must stay low.
  initial begin
    int t0 = 0;
    wait (en);
    while (got32 < 20) begin
      @(negedge clk);
      take32 = 0;
      if (full32) begin
        if (got32 == 3) begin
          repeat (3) begin
            #1 check(rdy32, 0, "ready low while full");
            @(negedge clk);
          end
        end
        take32 = 1;
        check(b32, q32.pop_front(), "block 32");
        if (got32 == 0) t0 = cyc;
        if (got32 == 9) check(cyc - t0, 9 * 4 + 3, "back-to-back rate 32");
        got32++;
      end
    end
    @(negedge clk) take32 = 0;
  end

  // 64-bit consumer: always takes at once.
  initial begin
    int t0 = 0;
    wait (en);
    while (got64 < 20) begin
      @(negedge clk);
      take64 = 0;
      if (full64) begin
        take64 = 1;
        check(b64, q64.pop_front(), "block 64");
        if (got64 == 0) t0 = cyc;
        if (got64 == 19) check(cyc - t0, 19 * 2, "back-to-back rate 64");
        got64++;
      end
    end
    @(negedge clk) take64 = 0;
    wait (got32 == 20);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
