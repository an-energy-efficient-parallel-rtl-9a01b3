// tb_aes_ct_serializer - checks the block-to-word output register for 32- and
// 64-bit words: after a load the words come out most significant first, one
// per clock, with out_valid high for exactly 4 (2) clocks; loads every 4 (2)
// clocks give a gap-free stream; out_valid is low after reset and when idle.
module tb_aes_ct_serializer;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0, ld32 = 0, ld64 = 0;
  block_t blk32 = '0, blk64 = '0;
  logic ov32, ov64;
  logic [31:0] od32;
  logic [63:0] od64;
  int checks = 0, failures = 0;

  aes_ct_serializer #(.BUS_W(32)) dut32 (.clk(clk), .rst_n(rst_n), .load_i(ld32), .block_i(blk32),
    .out_valid_o(ov32), .out_data_o(od32));
  aes_ct_serializer #(.BUS_W(64)) dut64 (.clk(clk), .rst_n(rst_n), .load_i(ld64), .block_i(blk64),
    .out_valid_o(ov64), .out_data_o(od64));

  always #5 clk = ~clk;

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
    block_t a, b;
    repeat (2) @(posedge clk);
    #1 check(ov32, 0, "idle after reset 32"); check(ov64, 0, "idle after reset 64");
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 30; n++) begin
      a = aes_ref_pkg::rand128();
      b = aes_ref_pkg::rand128();
      // the 64-bit side gets two blocks per 32-bit block
      ld32 = 1; blk32 = a; ld64 = 1; blk64 = b;
      @(negedge clk) begin
        ld32 = 0; ld64 = 0;
        check(ov32, 1, "valid 32 w0"); check(od32, a[127:96], "word 32 0");
        check(ov64, 1, "valid 64 w0"); check(od64, b[127:64], "word 64 0");
      end
      @(negedge clk) begin
        check(od32, a[95:64], "word 32 1");
        check(od64, b[63:0], "word 64 1");
        if (n < 20) begin
          b = aes_ref_pkg::rand128();
          ld64 = 1; blk64 = b;
        end
      end
      @(negedge clk) begin
        ld64 = 0;
        check(ov32, 1, "valid 32 w2"); check(od32, a[63:32], "word 32 2");
        if (n < 20) begin
          check(ov64, 1, "valid 64 second"); check(od64, b[127:64], "word 64 second 0");
        end else
          check(ov64, 0, "64 idle after 2 words");
      end
      @(negedge clk) begin
        check(ov32, 1, "valid 32 w3"); check(od32, a[31:0], "word 32 3");
        if (n < 20) check(od64, b[63:0], "word 64 second 1");
      end
      if (n >= 20) begin
        // gap: the 32-bit output must fall idle after 4 words
        @(negedge clk) check(ov32, 0, "32 idle after 4 words");
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
