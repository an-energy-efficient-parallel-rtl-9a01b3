// tb_aes_round - checks the full round (HAS_MIX = 1) on the FIPS-197 round-1
// example (start of round 1 193de3be... with round key a0fafe17... gives the
// start of round 2, a49c7ff2...) and both the full and the final round
// (HAS_MIX = 0) on random states and keys against the behavioural reference.
module tb_aes_round;
  import aes_pkg::*;

  block_t s, k, o_full, o_final;
  int checks = 0, failures = 0;

  aes_round #(.HAS_MIX(1'b1)) dut_full  (.state_i(s), .round_key_i(k), .state_o(o_full));
  aes_round #(.HAS_MIX(1'b0)) dut_final (.state_i(s), .round_key_i(k), .state_o(o_final));

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s s=%h k=%h got %h exp %h", what, s, k, got, exp);
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
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 check(o_full, 128'ha49c7ff2689f352b6b5bea43026a5049, "fips");
    for (int n = 0; n < 200; n++) begin
      block_t ss;
      s = aes_ref_pkg::rand128();
      k = aes_ref_pkg::rand128();
      ss = aes_ref_pkg::shift_rows(aes_ref_pkg::sub_bytes(s));
      #1;
      check(o_full,  aes_ref_pkg::mix_columns(ss) ^ k, "full");
      check(o_final, ss ^ k, "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
