// ram: the circuit under test, a single-port synchronous RAM of
// 2^ADDR_W words of DATA_W bits (256 x 8 by default).
//
// A write stores data_in at address on the rising clock edge when we is
// high. A read, when rd is high, registers the word at address into
// data_out on the same edge, so read data appears one clock after the
// request and stays until the next read. A read and a write of the same
// address in one cycle return the old word. The registered read port is
// this design's choice; the source gives the RAM's ports and size only.
module ram #(
  parameter int unsigned ADDR_W = bist_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W = bist_pkg::DATA_W_DEF
) (
  input  logic              clk,
  input  logic              we,
  input  logic              rd,
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[address] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rd) data_out <= mem[address];
  end

endmodule
