// tb_aes_system_control: walks the control unit through reset, a first key,
// expansion, encryption and a key change, with random core readiness, and
// checks mode, ready_for_key and ready_for_data against a cycle model kept
// in the testbench.
module tb_aes_system_control;
  import aes_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  if_status_t status = '0;
  core_ready_t core_rdy = '0;
  logic exp_done = 1'b0;
  mode_e mode;
  logic ready_for_key, ready_for_data;
  int checks = 0, failures = 0;

  aes_system_control dut (.*);

  always #5 clk = ~clk;

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

  // Model: 0 = no key, 1 = expanding, 2 = ready.
  int m_state = 0;

  task automatic step_and_check();
    logic exp_key, exp_data;
    #1;
    exp_key  = (m_state != 1) && !status.key_rd && !status.data_rd && core_rdy.new_key;
    exp_data = (m_state == 2) && status.key_valid && !status.key_rd && core_rdy.new_data;
    check("mode", mode == ((m_state == 1) ? MODE_KEY_EXPAND : MODE_ENCRYPT));
    check("ready_for_key", ready_for_key == exp_key);
    check("ready_for_data", ready_for_data == exp_data);
    @(posedge clk);
    if (m_state != 1 && status.key_rd) m_state = 1;
    else if (m_state == 1 && exp_done) m_state = 2;
    @(negedge clk);
  endtask

  int key_rd_count = 0, expand_count = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("no data before a key", !ready_for_data && mode == MODE_ENCRYPT);
    for (int n = 0; n < 2000; n++) begin
      core_rdy.new_data = 1'($urandom);
      core_rdy.new_key  = core_rdy.new_data && 1'($urandom);
      status.data_rd    = 1'($urandom);
      status.key_rd     = ($urandom_range(0, 30) == 0) && (m_state != 1);
      if (status.key_rd) begin status.key_valid = 1; key_rd_count++; end
      exp_done          = (m_state == 1) && ($urandom_range(0, 20) == 0);
      if (exp_done) expand_count++;
      step_and_check();
    end
    check("scenario reached expansion and ready", key_rd_count > 3 && expand_count > 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
