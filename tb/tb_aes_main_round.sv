// tb_aes_main_round - checks one pipeline stage of the pipelined cores.
//
// The testbench closes the feedback itself (in0 = R_out to iterate, or
// in0 = M_out to hold, as the last stage does) and checks: reset clears the
// register; sel = 1 loads In1; R_out = MixColumns(ShiftRows(SubBytes(M_out ^
// key))); four iterations with keys 0..3 of the FIPS-197 key turn the
// plaintext into the reference state after round 4 (before key 4); the hold
// path keeps M_out; en = 0 freezes the register.
module tb_aes_main_round;
  import aes_pkg::*;

  logic   clk = 0, rst_n = 0, en = 0, sel = 0, hold = 0;
  block_t in1 = '0, key = '0, m_out, r_out, in0;
  int checks = 0, failures = 0;

  assign in0 = hold ? m_out : r_out;

  aes_main_round dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .sel_i(sel), .in0_i(in0), .in1_i(in1),
    .round_key_i(key), .m_out_o(m_out), .r_out_o(r_out)
  );

  always #5 clk = ~clk;

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic block_t ref_round(block_t m, block_t k);
    return aes_ref_pkg::mix_columns(aes_ref_pkg::shift_rows(aes_ref_pkg::sub_bytes(m ^ k)));
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t cipher_key, pt, st, prev;
    cipher_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pt         = 128'h3243f6a8885a308d313198a2e0370734;
    repeat (2) @(posedge clk);
    #1 check(m_out, '0, "reset");
    rst_n = 1;

    // load the plaintext through In1
    @(negedge clk) begin en = 1; sel = 1; in1 = pt; end
    @(posedge clk) #1 check(m_out, pt, "load In1");
    // four passes with keys 0..3
    st = pt;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk) begin sel = 0; key = aes_ref_pkg::round_key(cipher_key, r); end
      #1 check(r_out, ref_round(m_out, key), "R_out");
      st = ref_round(st, key);
      @(posedge clk) #1 check(m_out, st, "iterate");
    end
    // independent check of the iterated value: FIPS-197 start of round 5 xor key 4
    check(m_out ^ aes_ref_pkg::round_key(cipher_key, 4), 128'he0927fe8c86363c0d9b1355085b8be01, "FIPS round 5");

    // hold through M_out while keys change on In1 side
    prev = m_out;
    @(negedge clk) begin hold = 1; sel = 0; in1 = aes_ref_pkg::rand128(); end
    repeat (3) @(posedge clk);
    #1 check(m_out, prev, "hold via M_out");
    // enable low freezes even with sel = 1
    @(negedge clk) begin en = 0; sel = 1; end
    @(posedge clk) #1 check(m_out, prev, "enable low");
    // random loads and single rounds
    for (int n = 0; n < 50; n++) begin
      block_t x;
      x = aes_ref_pkg::rand128();
      @(negedge clk) begin en = 1; sel = 1; hold = 0; in1 = x; key = aes_ref_pkg::rand128(); end
      @(posedge clk) #1 check(r_out, ref_round(x, key), "random round");
    end
    // synchronous reset
    @(negedge clk) rst_n = 0;
    @(posedge clk) #1 check(m_out, '0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
