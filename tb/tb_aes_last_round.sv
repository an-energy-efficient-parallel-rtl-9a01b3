// tb_aes_last_round - checks the pipelined cores' tail (key 9, SubBytes /
// ShiftRows, key 10). With the FIPS-197 example key, the state of round 9
// before its key addition is derived from the reference, and the output must
// be the FIPS-197 ciphertext 3925841d...; random states and keys are compared
// with the reference.
module tb_aes_last_round;
  import aes_pkg::*;

  block_t s, k9, k10, o;
  int checks = 0, failures = 0;

  aes_last_round dut (.state_i(s), .key9_i(k9), .key10_i(k10), .state_o(o));

  task automatic check(block_t exp);
    #1;
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL s=%h got %h exp %h", s, o, exp);
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
    block_t key, st;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    // rounds 1..8 complete, round 9 without its key addition
    st = 128'h3243f6a8885a308d313198a2e0370734 ^ aes_ref_pkg::round_key(key, 0);
    for (int r = 1; r <= 9; r++) begin
      st = aes_ref_pkg::mix_columns(aes_ref_pkg::shift_rows(aes_ref_pkg::sub_bytes(st)));
      if (r != 9) st ^= aes_ref_pkg::round_key(key, r);
    end
    s = st; k9 = aes_ref_pkg::round_key(key, 9); k10 = aes_ref_pkg::round_key(key, 10);
    check(128'h3925841d02dc09fbdc118597196a0b32);
    for (int n = 0; n < 200; n++) begin
      s = aes_ref_pkg::rand128(); k9 = aes_ref_pkg::rand128(); k10 = aes_ref_pkg::rand128();
      check(aes_ref_pkg::shift_rows(aes_ref_pkg::sub_bytes(s ^ k9)) ^ k10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
