// aes_sbox_dp_rom: one dual-ported, synchronous 256x8 S-box ROM.
//
// Two independent read ports; each registers the S-box value of its address
// on the rising clock edge, so data appears one cycle after the address.
// This is the shape of an FPGA block RAM configured as a dual-port ROM. The
// contents are computed at elaboration by aes_pkg::sbox_table.
module aes_sbox_dp_rom
  import aes_pkg::*;
(
  input  logic  clk,
  input  byte_t addr_a,
  input  byte_t addr_b,
  output byte_t data_a,
  output byte_t data_b
);

  sbox_table_t rom;

  initial rom = sbox_table();

  always_ff @(posedge clk) begin
    data_a <= rom[addr_a];
    data_b <= rom[addr_b];
  end

endmodule
