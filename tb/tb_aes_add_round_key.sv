// tb_aes_add_round_key - checks AddRoundKey on the FIPS-197 example (plaintext
// 3243f6a8... with key 2b7e1516... gives 193de3be...) and on random pairs
// against a bitwise XOR formed byte by byte in the testbench.
module tb_aes_add_round_key;
  import aes_pkg::*;

  block_t s, k, o;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state_i(s), .round_key_i(k), .state_o(o));

  task automatic check(block_t exp);
    #1;
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL s=%h k=%h got %h exp %h", s, k, o, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 128'h3243f6a8885a308d313198a2e0370734;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int n = 0; n < 200; n++) begin
      block_t e;
      s = aes_ref_pkg::rand128();
      k = aes_ref_pkg::rand128();
      for (int b = 0; b < 16; b++) e[8*b +: 8] = s[8*b +: 8] ^ k[8*b +: 8];
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
