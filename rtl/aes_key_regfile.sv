// aes_key_regfile: storage for the 11 round keys of AES-128.
//
// A single-ported RAM of DEPTH words of WIDTH bits with synchronous write and
// synchronous read: one access per cycle. With we high, wdata is written to
// addr at the clock edge; otherwise rdata takes the word at addr on the edge,
// so read data arrives one cycle after the address. During a write rdata
// holds its previous value. Depth, width, single port and synchronous access
// follow the design description; read-during-write behaviour is this
// design's choice.
module aes_key_regfile #(
  parameter int unsigned DEPTH  = 11,
  parameter int unsigned WIDTH  = 128,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

  a_addr_range: assert property (@(posedge clk) we |-> (int'(addr) < DEPTH))
    else $error("round key write address out of range");

endmodule
