// aes_processing_core: AES-128 round datapath with two interleaved blocks.
//
// One round takes two cycles, split at the synchronous S-box ROMs:
//   stage 1 (SubBytes/ShiftRows): the state bytes, already permuted by
//     ShiftRows, are sent to the 16 S-box lanes (to_sbox). ShiftRows only
//     moves bytes, so doing it on the addresses merges it with SubBytes.
//     The ROM registers the result at the clock edge.
//   stage 2 (MixColumns/AddRoundKey): from_sbox goes through MixColumns and
//     is XORed with the round key; the result is written to the state
//     register. In round 10 MixColumns is skipped: from_sbox XOR round key is
//     written to the ciphertext register and ct_valid pulses.
// The state register and the ROM output register form a two-slot ring. A
// block sits in one slot while another block sits in the other, so two blocks
// are encrypted at once without duplicating any logic, and a block finishes
// every 10 cycles when both slots are busy.
//
// Control: every cycle the block in the state register (if any) moves into
// stage 1 with its next round number; if the state register is empty, a new
// block from the input interface (input_ready, input_blk = plaintext XOR
// key, i.e. after round 0) enters as round 1. key_addr is the round number of
// the block in stage 1; the key logic returns that round key one cycle later,
// in time for stage 2.
//
// Timing: input_ready in cycle t gives ct_valid in cycle t+20.
// ready.new_data is high when a block arriving next cycle will find the state
// register empty (the block now in stage 2 is empty or in its last round);
// ready.new_key is high when no block is in flight or arriving.
// The two-stage split, merged SubBytes/ShiftRows, the interleaving and the
// 4-bit key address follow the design description; the slot bookkeeping and
// the exact ready rules are this design's own.
module aes_processing_core
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        input_ready,  // new whitened block (pulse)
  input  block_t      input_blk,
  input  block_t      round_key,    // round key of key_addr, one cycle later
  input  block_t      from_sbox,
  output block_t      to_sbox,
  output key_addr_t   key_addr,
  output core_ready_t ready,
  output logic        ct_valid,
  output block_t      ciphertext
);

  // Slot holding the state register (waiting for stage 1).
  logic      valid_s;
  key_addr_t round_s;   // round this block will run next
  block_t    state;
  // Slot whose addresses are in the S-box ROM (in stage 2 now).
  logic      valid_r;
  key_addr_t round_r;   // round being completed in stage 2

  logic      issue;
  key_addr_t issue_round;
  block_t    issue_blk;
  logic      last_r;
  block_t    stage2;

  // Stage 1 source: circulating block first, new block otherwise.
  always_comb begin
    issue       = valid_s || input_ready;
    issue_round = valid_s ? round_s : key_addr_t'(1);
    issue_blk   = valid_s ? state   : input_blk;
  end

  assign to_sbox  = shift_rows(issue_blk);
  assign key_addr = issue_round;

  // Stage 2.
  assign last_r = valid_r && (round_r == key_addr_t'(NR));
  assign stage2 = mix_columns(from_sbox) ^ round_key;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_s    <= 1'b0;
      valid_r    <= 1'b0;
      round_s    <= '0;
      round_r    <= '0;
      state      <= '0;
      ct_valid   <= 1'b0;
      ciphertext <= '0;
    end else begin
      valid_r  <= issue;
      round_r  <= issue_round;
      valid_s  <= valid_r && !last_r;
      round_s  <= round_r + 1'b1;
      state    <= stage2;
      ct_valid <= last_r;
      if (last_r) ciphertext <= from_sbox ^ round_key;
    end
  end

  assign ready.new_data = !valid_r || last_r;
  assign ready.new_key  = (!valid_r || last_r) && !valid_s && !input_ready;

  a_no_collision: assert property (@(posedge clk) disable iff (rst) !(input_ready && valid_s))
    else $error("new block arrived while both slots were busy");

endmodule
