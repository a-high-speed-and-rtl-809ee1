// tb_aes_sbox_rom: checks every byte value on every one of the 16 lanes of
// the S-box ROM bank against the reference S-box, including the one-cycle
// read latency, plus the FIPS-197 spot values S(00)=63 and S(53)=ed.
module tb_aes_sbox_rom;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic [127:0] addr = '0;
  logic [127:0] data;
  int checks = 0, failures = 0;
  u8 tbl [256];

  aes_sbox_rom dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) tbl[i] = ref_sbox(u8'(i));
    checks++; if (tbl[8'h00] != 8'h63) failures++;
    checks++; if (tbl[8'h53] != 8'hed) failures++;
    // Lane l gets value (v + 17*l) mod 256 so all lanes see different bytes.
    for (int v = 0; v < 256 + 1; v++) begin
      @(negedge clk);
      if (v > 0) begin
        // data now holds the lookup of the previous address.
        for (int l = 0; l < 16; l++) begin
          checks++;
          if (data[127-8*l -: 8] != tbl[(v - 1 + 17*l) % 256]) begin
            failures++;
            $display("lane %0d value %0d: got %h", l, v - 1, data[127-8*l -: 8]);
          end
        end
      end
      for (int l = 0; l < 16; l++) addr[127-8*l -: 8] = u8'((v + 17*l) % 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
