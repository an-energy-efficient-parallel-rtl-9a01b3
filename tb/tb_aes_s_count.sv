// tb_aes_s_count - checks the S_count ring for CPS = 4 (32-bit core) and
// CPS = 2 (64-bit core): after reset the load bit (CPS-1) is set, the pattern
// rotates left by one each clock, exactly one bit is set, phase_o is the index
// of the set bit, and the load bit recurs every CPS clocks.
module tb_aes_s_count;
  logic clk = 0, rst_n = 0;
  logic [3:0] s4;  logic [1:0] p4;
  logic [1:0] s2;  logic [0:0] p2;
  int checks = 0, failures = 0;

  aes_s_count #(.CPS(4)) dut4 (.clk(clk), .rst_n(rst_n), .s_count_o(s4), .phase_o(p4));
  aes_s_count #(.CPS(2)) dut2 (.clk(clk), .rst_n(rst_n), .s_count_o(s2), .phase_o(p2));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last4 = -1, last2 = -1;
    repeat (2) @(posedge clk);
    #1 check(s4, 4'b1000, "reset 4"); check(s2, 2'b10, "reset 2");
    rst_n = 1;
    for (int t = 1; t <= 40; t++) begin
      @(posedge clk) #1;
      check(s4, 4'b1 << ((t + 3) % 4), "ring 4");
      check(p4, (t + 3) % 4, "phase 4");
      check(s2, 2'b1 << ((t + 1) % 2), "ring 2");
      check(p2, (t + 1) % 2, "phase 2");
      if (s4[3]) begin if (last4 >= 0) check(t - last4, 4, "period 4"); last4 = t; end
      if (s2[1]) begin if (last2 >= 0) check(t - last2, 2, "period 2"); last2 = t; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
