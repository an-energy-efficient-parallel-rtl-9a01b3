// aes_stream_agent - testbench driver and checker for one AES core port set.
//
// Connect it to a core's key, plaintext and ciphertext ports. Tasks:
//   load_key(k)              waits until no block is in flight, pulses
//                            key_load for one clock, waits for key_ready
//                            and checks that it rose ten clocks later;
//   send(pt, exp, gaps)      sends one block as 128/BUS_W words (random idle
//                            clocks between words when gaps is set) and
//                            queues exp as the expected ciphertext;
//   send_ref(pt, gaps)       same, exp from the behavioural reference under
//                            the current key;
//   drain()                  waits until every queued block has come out.
// The monitor runs while rst_n is high. It rebuilds ciphertext blocks from out_valid/out_data and compares
// them in order with the queue. It also checks timing: for every block the
// number of clocks from the acceptance of its last plaintext word to its
// first ciphertext word must lie in [LAT_MIN, LAT_MAX], and for blocks whose
// words arrived back to back right after the previous block it must equal
// LAT_MIN, with first ciphertext words exactly 128/BUS_W clocks apart.
module aes_stream_agent #(
  parameter int unsigned BUS_W   = 32,
  parameter int unsigned LAT_MIN = 2,
  parameter int unsigned LAT_MAX = 2,
  parameter string       NAME    = "core"
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             key_load,
  output logic [127:0]     key,
  input  logic             key_ready,
  output logic             in_valid,
  output logic [BUS_W-1:0] in_data,
  input  logic             in_ready,
  input  logic             out_valid,
  input  logic [BUS_W-1:0] out_data
);
  localparam int unsigned WORDS = 128 / BUS_W;

  int checks = 0, failures = 0;
  int blocks_in = 0, blocks_out = 0, stalls = 0, key_loads = 0, contiguous = 0;
  logic [127:0] cur_key = '0;

  logic [127:0] exp_q [$];
  int           last_q [$];   // clock of last-word acceptance per block
  bit           cont_q [$];   // block came back to back

  initial begin
    key_load = 0; key = '0; in_valid = 0; in_data = '0;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s %s got %h exp %h", NAME, what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ monitor
  int cyc = 0, in_words = 0, first_acc = 0, prev_last = -10;
  int out_words = 0, prev_out = -100;
  bit prev_cont = 0;
  logic [127:0] out_blk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready) begin
      if (in_words == 0) first_acc = cyc;
      in_words++;
      if (in_words == WORDS) begin
        last_q.push_back(cyc);
        cont_q.push_back(first_acc == prev_last + 1 && cyc == first_acc + WORDS - 1);
        prev_last = cyc;
        in_words = 0;
      end
    end
    if (out_valid) begin
      if (out_words == 0) begin
        int t_last;
        bit cont;
        if (last_q.size() == 0) begin
          failures++;
          $display("FAIL %s output without input", NAME);
          t_last = cyc; cont = 0;
        end else begin
          t_last = last_q.pop_front();
          cont = cont_q.pop_front();
        end
        checks++;
        if (cyc - t_last < LAT_MIN || cyc - t_last > LAT_MAX) begin
          failures++;
          $display("FAIL %s latency %0d outside [%0d,%0d]", NAME, cyc - t_last, LAT_MIN, LAT_MAX);
        end
        if (cont) begin
          contiguous++;
          check(cyc - t_last, LAT_MIN, "latency of a back-to-back block");
          if (prev_cont) check(cyc - prev_out, WORDS, "block spacing in a stream");
        end
        prev_cont = cont;
        prev_out = cyc;
      end
      out_blk[127 - BUS_W*out_words -: BUS_W] = out_data;
      out_words++;
      if (out_words == WORDS) begin
        out_words = 0;
        blocks_out++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL %s unexpected block %h", NAME, out_blk);
        end else
          check(out_blk, exp_q.pop_front(), "ciphertext");
      end
    end else if (out_words != 0) begin
      failures++;
      $display("FAIL %s gap inside an output block", NAME);
      out_words = 0;
    end
  end

  // ------------------------------------------------------------ driver
  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  task automatic load_key(logic [127:0] k);
    int n = 0;
    drain();
    @(negedge clk);
    key_load = 1; key = k; cur_key = k;
    @(negedge clk);
    key_load = 0;
    check(key_ready, 0, "key_ready low during expansion");
    while (!key_ready) begin @(negedge clk); n++; end
    check(n, 10, "key expansion clocks");
    key_loads++;
  endtask

  task automatic send(logic [127:0] pt, logic [127:0] exp, bit gaps);
    exp_q.push_back(exp);
    blocks_in++;
    for (int w = 0; w < WORDS; w++) begin
      if (gaps) begin
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      in_valid = 1;
      in_data  = pt[127 - BUS_W*w -: BUS_W];
      #1 while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic send_ref(logic [127:0] pt, bit gaps);
    send(pt, aes_ref_pkg::encrypt(cur_key, pt), gaps);
  endtask

endmodule
