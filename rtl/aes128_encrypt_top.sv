// aes128_encrypt_top: AES-128 encryption core (encryption only, 128-bit key).
//
// Five units: the input interface (key register and initial AddRoundKey on
// load), the key logic (offline key expansion into an 11x128 register file),
// the processing core (two-cycle rounds, two blocks interleaved), the shared
// S-box ROM bank (eight dual-ported 256x8 ROMs) and the system control unit.
// A multiplexer in front of the ROM bank gives its address to the key logic
// during expansion (32 bits on lanes 0..3, zeros elsewhere) and to the core
// otherwise; the ROM output goes to both.
//
// Use: wait for ready_for_key, put the key on key_plaintext and pulse
// load_key. Expansion takes 22 cycles after the strobe. Then, whenever
// ready_for_data is high, put a plaintext block on key_plaintext and pulse
// load_data; its ciphertext appears with a ct_valid pulse 21 cycles after
// the strobe. Two blocks can be in flight; loading as soon as
// ready_for_data allows gives two blocks every 20 cycles. A strobe while its
// ready signal is low is a protocol error (assertions flag it).
// Clock rising edge, synchronous active-high reset.
module aes128_encrypt_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  block_t key_plaintext,
  input  logic   load_key,
  input  logic   load_data,
  output logic   ready_for_key,
  output logic   ready_for_data,
  output block_t ciphertext,
  output logic   ct_valid
);

  logic        key_rd, data_rd, exp_done;
  block_t      cipher_key, input_blk, round_key;
  if_status_t  status;
  core_ready_t core_rdy;
  mode_e       mode;
  key_addr_t   key_addr;
  word_t       key_sbox_addr;
  block_t      core_sbox_addr, sbox_addr, sbox_data;

  aes_input_interface u_input (
    .clk        (clk),
    .rst        (rst),
    .din        (key_plaintext),
    .load_key   (load_key),
    .load_data  (load_data),
    .key_rd     (key_rd),
    .cipher_key (cipher_key),
    .data_rd    (data_rd),
    .input_blk  (input_blk),
    .status     (status)
  );

  aes_key_logic u_key (
    .clk        (clk),
    .rst        (rst),
    .mode       (mode),
    .key_rd     (key_rd),
    .cipher_key (cipher_key),
    .key_addr   (key_addr),
    .sbox_data  (sbox_data[127:96]),
    .sbox_addr  (key_sbox_addr),
    .round_key  (round_key),
    .exp_done   (exp_done)
  );

  aes_processing_core u_core (
    .clk         (clk),
    .rst         (rst),
    .input_ready (data_rd),
    .input_blk   (input_blk),
    .round_key   (round_key),
    .from_sbox   (sbox_data),
    .to_sbox     (core_sbox_addr),
    .key_addr    (key_addr),
    .ready       (core_rdy),
    .ct_valid    (ct_valid),
    .ciphertext  (ciphertext)
  );

  assign sbox_addr = (mode == MODE_KEY_EXPAND) ? {key_sbox_addr, 96'h0} : core_sbox_addr;

  aes_sbox_rom u_sbox (
    .clk  (clk),
    .addr (sbox_addr),
    .data (sbox_data)
  );

  aes_system_control u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .status         (status),
    .core_rdy       (core_rdy),
    .exp_done       (exp_done),
    .mode           (mode),
    .ready_for_key  (ready_for_key),
    .ready_for_data (ready_for_data)
  );

  a_key_protocol: assert property (@(posedge clk) disable iff (rst) load_key |-> ready_for_key)
    else $error("load_key while not ready_for_key");
  a_data_protocol: assert property (@(posedge clk) disable iff (rst) load_data |-> ready_for_data)
    else $error("load_data while not ready_for_data");

endmodule
