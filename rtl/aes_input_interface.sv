// aes_input_interface: loads cipher keys and plaintext blocks from the shared
// 128-bit Key/Plaintext bus.
//
// load_key and load_data mark the bus as valid and say what it carries.
// - load_key : the bus value is stored in the local key register and key_rd
//              pulses for one cycle, telling the key logic to expand it.
// - load_data: the bus value XOR the stored key is latched into the block
//              register and data_rd pulses for one cycle. The XOR is the
//              AES initial AddRoundKey, done while loading so the processing
//              core only has to run rounds 1..10.
// Both outputs are registered: key_rd/data_rd and their values appear the
// cycle after the load strobe. If both strobes are high together the key
// wins and the data is dropped (an assertion flags it). The 3-bit status
// bus (key_rd, data_rd, key_valid) goes to the system control unit; its
// contents are this design's choice. Reset is synchronous and active high.
module aes_input_interface
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  block_t     din,         // Key/Plaintext bus
  input  logic       load_key,
  input  logic       load_data,
  output logic       key_rd,
  output block_t     cipher_key,  // local key register
  output logic       data_rd,
  output block_t     input_blk,   // plaintext XOR cipher key
  output if_status_t status
);

  logic key_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      key_rd     <= 1'b0;
      data_rd    <= 1'b0;
      key_valid  <= 1'b0;
      cipher_key <= '0;
      input_blk  <= '0;
    end else begin
      key_rd  <= load_key;
      data_rd <= load_data && !load_key;
      if (load_key) begin
        cipher_key <= din;
        key_valid  <= 1'b1;
      end else if (load_data) begin
        input_blk <= din ^ cipher_key;
      end
    end
  end

  assign status = '{key_rd: key_rd, data_rd: data_rd, key_valid: key_valid};

  a_one_load: assert property (@(posedge clk) disable iff (rst) !(load_key && load_data))
    else $error("load_key and load_data asserted together");

endmodule
