// tb_aes_input_interface: loads keys and blocks and checks the stored key,
// the key-whitened block (plaintext XOR key), the one-cycle key_rd/data_rd
// pulses and the status bus.
module tb_aes_input_interface;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  block_t din = '0;
  logic load_key = 0, load_data = 0;
  logic key_rd, data_rd;
  block_t cipher_key, input_blk;
  if_status_t status;
  int checks = 0, failures = 0;

  aes_input_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    blk_t k, p;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("no key after reset", status.key_valid == 0 && !key_rd && !data_rd);
    for (int n = 0; n < 20; n++) begin
      k = rand_blk();
      @(negedge clk) begin din = k; load_key = 1; end
      @(negedge clk) begin load_key = 0; din = rand_blk(); end
      check("key_rd pulse", key_rd == 1 && status.key_rd == 1 && data_rd == 0);
      check("key stored", cipher_key == k && status.key_valid == 1);
      @(negedge clk);
      check("key_rd one cycle", key_rd == 0);
      for (int b = 0; b < 4; b++) begin
        p = rand_blk();
        @(negedge clk) begin din = p; load_data = 1; end
        @(negedge clk) begin load_data = 0; din = rand_blk(); end
        check("data_rd pulse", data_rd == 1 && status.data_rd == 1 && key_rd == 0);
        check("whitened block", input_blk == (p ^ k));
        check("key kept", cipher_key == k);
        @(negedge clk);
        check("data_rd one cycle", data_rd == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
