// tb_aes_processing_core: drives the processing core with key-whitened
// blocks and checks each ciphertext against the reference AES-128 model.
// The S-box ROM bank and the round-key register file are modelled here as
// registered lookups (one-cycle latency each). Checks:
//  - FIPS-197 Appendix C.1 vector, single block;
//  - 20 cycles from input_ready to ct_valid;
//  - two blocks interleaved: streaming as fast as ready.new_data allows
//    gives 2 blocks per 20 cycles, and two blocks are seen in flight;
//  - random gaps between blocks;
//  - ready.new_key only when the core is empty.
module tb_aes_processing_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic input_ready = 1'b0;
  block_t input_blk = '0;
  block_t round_key, from_sbox, to_sbox, ciphertext;
  key_addr_t key_addr;
  core_ready_t ready;
  logic ct_valid;
  int checks = 0, failures = 0;

  u8 sb [256];
  rkeys_t rk;
  blk_t key;

  aes_processing_core dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    for (int l = 0; l < 16; l++) from_sbox[127-8*l -: 8] <= sb[to_sbox[127-8*l -: 8]];
    round_key <= (int'(key_addr) < 11) ? rk[key_addr] : '0;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Expected ciphertexts, in order, and the cycle each block entered.
  blk_t exp_q [$];
  int   start_q [$];
  int   cycle = 0;
  int   in_flight = 0, max_in_flight = 0, done = 0;
  int   last_done_cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (exp_q.size() > max_in_flight) max_in_flight = exp_q.size();
  end

  // Scoreboard.
  always @(negedge clk) begin
    if (!rst && ct_valid) begin
      check("ciphertext matches reference", exp_q.size() > 0 && ciphertext == exp_q[0]);
      check("latency 20 cycles", start_q.size() > 0 && cycle - start_q[0] == 20);
      if (exp_q.size() > 0) begin void'(exp_q.pop_front()); void'(start_q.pop_front()); end
      in_flight--;
      done++;
      last_done_cycle = cycle;
    end
    // A block whose last round is in stage 2 no longer needs the round keys.
    if (!rst && ready.new_key)
      check("new_key only when empty", !input_ready &&
            (start_q.size() == 0 || (start_q.size() == 1 && cycle - start_q[0] == 19)));
  end

  // Send one block in the current cycle (call at a negedge).
  task automatic send(blk_t pt);
    input_blk   = pt ^ rk[0];
    input_ready = 1;
    exp_q.push_back(ref_encrypt(key, pt));
    start_q.push_back(cycle);
    in_flight++;
  endtask

  task automatic stream(int n, bit gaps);
    int sent = 0;
    while (sent < n) begin
      @(negedge clk);
      input_ready = 0;
      // ready was sampled in the previous cycle: the block may go now.
      if (prev_ready && (!gaps || $urandom_range(0, 3) == 0)) begin
        send(rand_blk());
        sent++;
      end
    end
    @(negedge clk) input_ready = 0;
    while (in_flight > 0) @(negedge clk);
  endtask

  logic prev_ready = 0;
  always @(posedge clk) prev_ready <= ready.new_data;

  initial begin
    int t0, base;
    for (int i = 0; i < 256; i++) sb[i] = ref_sbox(u8'(i));
    key = 128'h000102030405060708090a0b0c0d0e0f;
    rk  = ref_expand(key);
    check("FIPS-197 C.1 reference",
          ref_encrypt(key, 128'h00112233445566778899aabbccddeeff) == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("ready after reset", ready.new_data && ready.new_key);
    // Single FIPS block.
    @(negedge clk) send(128'h00112233445566778899aabbccddeeff);
    @(negedge clk) input_ready = 0;
    while (in_flight > 0) @(negedge clk);
    // Full-rate stream: 2 blocks per 20 cycles.
    key = rand_blk(); rk = ref_expand(key);
    base = done; t0 = cycle;
    stream(40, 0);
    check("throughput: 40 blocks in 20*20+1 cycles",
          last_done_cycle - t0 <= 20 * 20 + 2);
    $display("40 blocks took %0d cycles", last_done_cycle - t0);
    check("two blocks in flight", max_in_flight == 2);
    // Random gaps.
    key = rand_blk(); rk = ref_expand(key);
    stream(30, 1);
    check("all blocks came out", exp_q.size() == 0 && done == 71);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
