// tb_aes128_encrypt_top: end-to-end test of the AES-128 encryption core at
// its default configuration.
//
// Acts as the external logic: loads a key when ready_for_key is high, loads
// plaintext blocks when ready_for_data is high, and checks every ciphertext
// against the reference model (FIPS-197 C.1 first). Checked timing: 22
// cycles from the load_key strobe to ready_for_data (load, 20-cycle
// expansion, mode switch), 21 cycles from load_data to ct_valid, and two
// blocks every 20 cycles when loading at full rate. Counted mechanisms, each
// of which must occur: key expansion, key change after encryption, two
// blocks in flight at once, a block loaded while the core was full (early
// ReadyForData), and back-to-back blocks.
module tb_aes128_encrypt_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  block_t key_plaintext = '0;
  logic load_key = 1'b0, load_data = 1'b0;
  logic ready_for_key, ready_for_data, ct_valid;
  block_t ciphertext;
  int checks = 0, failures = 0;

  aes128_encrypt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cycle = 0;
  blk_t key;
  blk_t exp_q [$];
  int   start_q [$];
  int   n_expand = 0, n_key_change = 0, n_two_in_flight = 0, n_early_load = 0,
        n_back_to_back = 0, n_blocks = 0;
  int   last_load = -10, last_ct = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (exp_q.size() == 2 && !load_data) n_two_in_flight++;
  end

  always @(negedge clk) begin
    if (!rst && ct_valid) begin
      check("ciphertext", exp_q.size() > 0 && ciphertext == exp_q[0]);
      check("load_data to ct_valid 21 cycles", start_q.size() > 0 && cycle - start_q[0] == 21);
      if (exp_q.size() > 0) begin void'(exp_q.pop_front()); void'(start_q.pop_front()); end
      n_blocks++;
      last_ct = cycle;
    end
  end

  task automatic load_new_key(blk_t k);
    int t0;
    while (!ready_for_key) @(negedge clk);
    if (exp_q.size() != 0) check("key only loaded when core empty", 0);
    key = k;
    key_plaintext = k; load_key = 1; t0 = cycle;
    @(negedge clk) begin load_key = 0; key_plaintext = rand_blk(); end
    check("ready_for_key drops after load", !ready_for_key && !ready_for_data);
    while (!ready_for_data && cycle - t0 < 100) @(negedge clk);
    check("key load to ready_for_data 22 cycles", cycle - t0 == 22);
    n_expand++;
  endtask

  // Load one block in the current cycle (called at a negedge, ready high).
  task automatic load_block(blk_t pt);
    if (exp_q.size() == 2) n_early_load++;
    if (cycle == last_load + 1) n_back_to_back++;
    key_plaintext = pt; load_data = 1;
    exp_q.push_back(ref_encrypt(key, pt));
    start_q.push_back(cycle);
    last_load = cycle;
  endtask

  task automatic stream(int n, int gap_pct);
    int sent = 0;
    while (sent < n) begin
      if (ready_for_data && $urandom_range(0, 99) >= gap_pct) begin
        load_block(rand_blk());
        sent++;
      end
      @(negedge clk) begin load_data = 0; key_plaintext = rand_blk(); end
    end
    while (exp_q.size() > 0) @(negedge clk);
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("after reset: key wanted, no data", ready_for_key && !ready_for_data);

    // FIPS-197 Appendix C.1.
    load_new_key(128'h000102030405060708090a0b0c0d0e0f);
    load_block(128'h00112233445566778899aabbccddeeff);
    @(negedge clk) load_data = 0;
    exp_q[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;  // printed value, not the model
    while (exp_q.size() > 0) @(negedge clk);

    // Full-rate stream: 2 blocks per 20 cycles.
    t0 = cycle;
    stream(50, 0);
    $display("50 blocks at full rate: %0d cycles", last_ct - t0);
    check("full-rate throughput (25 pairs x 20 cycles + latency)", last_ct - t0 <= 25 * 20 + 2);

    // Key changes with random gaps.
    for (int k = 0; k < 4; k++) begin
      load_new_key(rand_blk());
      n_key_change++;
      stream(20, 60);
    end

    check("key expansion happened", n_expand >= 5);
    check("key change after encryption happened", n_key_change >= 4);
    check("two blocks in flight happened", n_two_in_flight > 0);
    check("early load while core full happened", n_early_load > 0);
    check("back-to-back loads happened", n_back_to_back > 0);
    check("all blocks out", n_blocks == 131);
    $display("expansions=%0d key_changes=%0d two_in_flight_cycles=%0d early_loads=%0d back_to_back=%0d blocks=%0d",
             n_expand, n_key_change, n_two_in_flight, n_early_load, n_back_to_back, n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
