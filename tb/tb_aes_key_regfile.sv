// tb_aes_key_regfile: writes all 11 entries, reads them back in random order
// and checks the one-cycle synchronous read and that a write leaves the read
// data alone.
module tb_aes_key_regfile;
  import aes_ref_pkg::*;

  logic clk = 1'b0, we = 1'b0;
  logic [3:0] addr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] model [11];
  int checks = 0, failures = 0;

  aes_key_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] last;
    for (int pass = 0; pass < 5; pass++) begin
      for (int i = 0; i < 11; i++) begin
        model[i] = rand_blk();
        @(negedge clk) begin we = 1; addr = 4'(i); wdata = model[i]; end
      end
      @(negedge clk) we = 0;
      for (int n = 0; n < 40; n++) begin
        int a = $urandom_range(0, 10);
        addr = 4'(a);
        @(negedge clk);
        checks++;
        if (rdata != model[a]) begin failures++; $display("read %0d: %h", a, rdata); end
      end
      last = rdata;
      @(negedge clk) begin we = 1; addr = 4'(0); wdata = ~model[0]; model[0] = ~model[0]; end
      @(negedge clk) we = 0;
      checks++;
      if (rdata != last) begin failures++; $display("rdata changed during write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
