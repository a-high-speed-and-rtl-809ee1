// aes_sbox_rom: the shared S-box ROM bank of the AES-128 core.
//
// A full 128-bit state needs 16 byte substitutions per cycle. Eight
// dual-ported 256x8 ROMs (aes_sbox_dp_rom) supply them: ROM k serves byte
// lanes 2k (port A) and 2k+1 (port B). Byte lane i is bits
// [127-8i -: 8] of addr and data.
//
// Timing: synchronous, one cycle. data holds S(addr) of the previous cycle.
// Both the processing core (all 16 lanes) and the key logic (lanes 0..3,
// the SubWord of key expansion) use this bank through a multiplexer in the
// top level. The ROM count, the dual porting and the one-cycle latency follow
// the design description; the lane-to-port assignment is this design's own.
module aes_sbox_rom
  import aes_pkg::*;
#(
  parameter int unsigned LANES = 16   // byte substitutions per cycle
) (
  input  logic               clk,
  input  logic [8*LANES-1:0] addr,
  output logic [8*LANES-1:0] data
);

  localparam int unsigned ROMS = LANES / 2;

  for (genvar k = 0; k < ROMS; k++) begin : g_rom
    aes_sbox_dp_rom u_rom (
      .clk    (clk),
      .addr_a (addr[8*LANES-1-16*k -: 8]),
      .addr_b (addr[8*LANES-9-16*k -: 8]),
      .data_a (data[8*LANES-1-16*k -: 8]),
      .data_b (data[8*LANES-9-16*k -: 8])
    );
  end

  initial assert (LANES % 2 == 0) else $error("LANES must be even");

endmodule
