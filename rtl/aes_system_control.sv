// aes_system_control: top-level sequencing of the AES-128 core.
//
// A three-state FSM. NO_KEY after reset; a latched key (status.key_rd) moves
// it to EXPAND, where mode = MODE_KEY_EXPAND hands the S-box ROMs to the key
// logic; exp_done moves it to READY, where mode = MODE_ENCRYPT and plaintext
// may be loaded. A new key may be loaded in READY whenever the core is empty,
// which restarts expansion.
// ready_for_key / ready_for_data tell the external logic when a load_key /
// load_data strobe is allowed in the same cycle. Both are combinational from
// registered state. Both drop in the cycle after a key load (status.key_rd);
// ready_for_key also stays low while a block is being handed to the core.
// The blocks below do their own sequencing; this unit only selects the mode
// and does the I/O signalling, as the design description says. The states
// and the exact ready rules are this design's own.
module aes_system_control
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  if_status_t  status,
  input  core_ready_t core_rdy,
  input  logic        exp_done,
  output mode_e       mode,
  output logic        ready_for_key,
  output logic        ready_for_data
);

  typedef enum logic [1:0] {ST_NO_KEY, ST_EXPAND, ST_READY} state_e;

  state_e st, st_nxt;

  always_comb begin
    st_nxt = st;
    unique case (st)
      ST_NO_KEY: if (status.key_rd) st_nxt = ST_EXPAND;
      ST_EXPAND: if (exp_done)      st_nxt = ST_READY;
      ST_READY:  if (status.key_rd) st_nxt = ST_EXPAND;
      default:                      st_nxt = ST_NO_KEY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) st <= ST_NO_KEY;
    else     st <= st_nxt;
  end

  assign mode           = (st == ST_EXPAND) ? MODE_KEY_EXPAND : MODE_ENCRYPT;
  assign ready_for_key  = (st != ST_EXPAND) && !status.key_rd && !status.data_rd
                          && core_rdy.new_key;
  assign ready_for_data = (st == ST_READY) && status.key_valid && !status.key_rd
                          && core_rdy.new_data;

endmodule
