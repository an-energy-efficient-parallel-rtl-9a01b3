// tb_aes_mix_columns - checks MixColumns on the FIPS-197 round-1 example
// (d4bf5d30... -> 046681e5...) and on random states against the behavioural
// reference.
module tb_aes_mix_columns;
  import aes_pkg::*;

  block_t s, o;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_i(s), .state_o(o));

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
    s = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    check(128'h046681e5e0cb199a48f8d37a2806264c);
    for (int n = 0; n < 200; n++) begin
      s = aes_ref_pkg::rand128();
      check(aes_ref_pkg::mix_columns(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
