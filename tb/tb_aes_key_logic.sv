// tb_aes_key_logic: runs key expansion for the FIPS-197 key and for random
// keys, then reads all 11 round keys back through the read port and compares
// them with the reference expansion. It also checks the timing: exp_done
// comes 20 cycles after the key_rd cycle (10 round keys, two cycles each)
// and a round key appears one cycle after its address. The S-box ROM is
// modelled here as a registered lookup in the reference S-box, and the
// testbench plays the system control unit (mode).
module tb_aes_key_logic;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  mode_e mode = MODE_ENCRYPT;
  logic key_rd = 1'b0;
  block_t cipher_key = '0;
  key_addr_t key_addr = '0;
  word_t sbox_data, sbox_addr;
  block_t round_key;
  logic exp_done;
  int checks = 0, failures = 0;

  aes_key_logic dut (.*);

  always #5 clk = ~clk;

  // Synchronous S-box model.
  always_ff @(posedge clk)
    sbox_data <= {ref_sbox(sbox_addr[31:24]), ref_sbox(sbox_addr[23:16]),
                  ref_sbox(sbox_addr[15:8]),  ref_sbox(sbox_addr[7:0])};

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic expand_and_check(blk_t k);
    rkeys_t rk = ref_expand(k);
    int cycles = 0;
    @(negedge clk) begin cipher_key = k; key_rd = 1; end
    @(negedge clk) begin key_rd = 0; mode = MODE_KEY_EXPAND; cipher_key = rand_blk(); end
    cycles = 1;
    while (!exp_done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check("exp_done 20 cycles after key_rd", cycles == 20);
    @(negedge clk) mode = MODE_ENCRYPT;
    check("exp_done is a pulse", !exp_done);
    for (int n = 0; n < 22; n++) begin
      int r = (n < 11) ? n : $urandom_range(0, 10);
      key_addr = key_addr_t'(r);
      @(negedge clk);
      check($sformatf("round key %0d", r), round_key == rk[r]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    expand_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    // FIPS-197 Appendix A.1: last round key of this key.
    check("FIPS-197 round key 10", ref_expand(128'h2b7e151628aed2a6abf7158809cf4f3c)[10]
          == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int n = 0; n < 10; n++) expand_and_check(rand_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
