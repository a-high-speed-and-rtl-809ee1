// aes_key_logic: offline key expansion and round-key storage for AES-128.
//
// All 11 round keys are generated once, when a new cipher key arrives, and
// kept in an 11x128 single-ported register file (aes_key_regfile). During
// encryption the processing core reads one round key per cycle from it.
//
// Expansion sequence (key_rd starts it, mode == MODE_KEY_EXPAND keeps it
// running):
//   load cycle : the cipher key is written to entry 0 and to the working
//                register prev.
//   SUB cycle  : RotWord of the last word of prev drives sbox_addr (32 bits,
//                placed on S-box lanes 0..3 by the top level).
//   MIX cycle  : the S-box output (available now, the ROM is synchronous) is
//                XORed with Rcon and with the four words of prev in a chain,
//                giving the next round key. It is written to entry r and to
//                prev. exp_done pulses in the MIX cycle of round 10.
// Ten round keys at two cycles each take 20 cycles, plus the load cycle.
//
// Read port: outside expansion, key_addr (from the processing core) is the
// register-file address and round_key shows that entry one cycle later.
// The two-cycle split, register-file shape and 20-cycle expansion follow the
// design description. The choice of the last word for RotWord follows
// FIPS-197; the start/enable and done signalling are this design's own.
module aes_key_logic
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  mode_e     mode,
  input  logic      key_rd,      // new cipher key available (pulse)
  input  block_t    cipher_key,
  input  key_addr_t key_addr,    // round key requested by the core
  input  word_t     sbox_data,   // SubWord result, one cycle after sbox_addr
  output word_t     sbox_addr,
  output block_t    round_key,
  output logic      exp_done
);

  typedef enum logic [0:0] {PH_SUB, PH_MIX} phase_e;

  block_t    prev;
  key_addr_t round;
  phase_e    phase;
  logic      busy;
  logic      mix_cycle;
  block_t    next_key;

  logic      rf_we;
  key_addr_t rf_addr;
  block_t    rf_wdata;

  assign sbox_addr = rot_word(prev[31:0]);
  assign mix_cycle = busy && (mode == MODE_KEY_EXPAND) && (phase == PH_MIX);
  assign exp_done  = mix_cycle && (round == key_addr_t'(NR));

  always_comb begin
    word_t w0, w1, w2, w3;
    w0 = prev[127:96] ^ sbox_data ^ {rcon(int'(round)), 24'h0};
    w1 = prev[95:64] ^ w0;
    w2 = prev[63:32] ^ w1;
    w3 = prev[31:0]  ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      round <= '0;
      phase <= PH_SUB;
      prev  <= '0;
    end else if (key_rd) begin
      busy  <= 1'b1;
      round <= key_addr_t'(1);
      phase <= PH_SUB;
      prev  <= cipher_key;
    end else if (busy && mode == MODE_KEY_EXPAND) begin
      if (phase == PH_SUB) begin
        phase <= PH_MIX;
      end else begin
        phase <= PH_SUB;
        prev  <= next_key;
        round <= round + 1'b1;
        if (round == key_addr_t'(NR)) busy <= 1'b0;
      end
    end
  end

  // Single register-file port: writes during expansion, reads otherwise.
  always_comb begin
    rf_we    = key_rd || mix_cycle;
    rf_addr  = key_rd ? '0 : (mix_cycle ? round : key_addr);
    rf_wdata = key_rd ? cipher_key : next_key;
  end

  aes_key_regfile #(
    .DEPTH  (NUM_RKEYS),
    .WIDTH  (BLOCK_W),
    .ADDR_W (KEY_ADDR_W)
  ) u_rf (
    .clk   (clk),
    .we    (rf_we),
    .addr  (rf_addr),
    .wdata (rf_wdata),
    .rdata (round_key)
  );

endmodule
