// test_collar: the multiplexer in front of the RAM.
//
// In normal mode (test_mode low) the system port drives the RAM's write
// enable, read enable, address and write data; in test mode the BIST port
// does, and the system's requests are ignored. Read data goes back to both
// sides, but the system sees zeros while the test runs so that test data
// does not leak into the system. Placing a multiplexer collar between the
// BIST and the RAM follows the source's general BIST architecture; the
// zeroing of system read data is this design's choice. The block is purely
// combinational.
module test_collar #(
  parameter int unsigned ADDR_W = bist_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W = bist_pkg::DATA_W_DEF
) (
  input  logic              test_mode,
  // system (normal mode) port
  input  logic              sys_we,
  input  logic              sys_rd,
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_wdata,
  output logic [DATA_W-1:0] sys_rdata,
  // BIST (test mode) port
  input  logic              bist_we,
  input  logic              bist_rd,
  input  logic [ADDR_W-1:0] bist_addr,
  input  logic [DATA_W-1:0] bist_wdata,
  output logic [DATA_W-1:0] bist_rdata,
  // RAM side
  output logic              ram_we,
  output logic              ram_rd,
  output logic [ADDR_W-1:0] ram_addr,
  output logic [DATA_W-1:0] ram_wdata,
  input  logic [DATA_W-1:0] ram_rdata
);

  always_comb begin
    if (test_mode) begin
      ram_we    = bist_we;
      ram_rd    = bist_rd;
      ram_addr  = bist_addr;
      ram_wdata = bist_wdata;
      sys_rdata = '0;
    end else begin
      ram_we    = sys_we;
      ram_rd    = sys_rd;
      ram_addr  = sys_addr;
      ram_wdata = sys_wdata;
      sys_rdata = ram_rdata;
    end
    bist_rdata = ram_rdata;
  end

endmodule
