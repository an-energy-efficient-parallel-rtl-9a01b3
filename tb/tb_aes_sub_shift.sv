// tb_aes_sub_shift - checks SubBytes+ShiftRows: single S-box values from the
// FIPS-197 table (00->63, 01->7c, 53->ed, ff->16, placed in byte 0 so that
// ShiftRows leaves them there), the FIPS-197 round-1 example, and random
// states against the behavioural reference.
module tb_aes_sub_shift;
  import aes_pkg::*;

  block_t s, o;
  int checks = 0, failures = 0;

  aes_sub_shift dut (.state_i(s), .state_o(o));

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
    // byte 0 only; other bytes are 0x00 -> 0x63
    s = {8'h00, 120'h0}; check({8'h63, {15{8'h63}}});
    s = {8'h01, 120'h0}; check({8'h7c, {15{8'h63}}});
    s = {8'h53, 120'h0}; check({8'hed, {15{8'h63}}});
    s = {8'hff, 120'h0}; check({8'h16, {15{8'h63}}});
    // FIPS-197 appendix B, round 1: start -> after ShiftRows
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int n = 0; n < 200; n++) begin
      s = aes_ref_pkg::rand128();
      check(aes_ref_pkg::shift_rows(aes_ref_pkg::sub_bytes(s)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
