// bist_top: a 256 x 8 RAM with its built-in self-test.
//
// The blocks are wired as in the BIST block diagram: the controller drives
// the address generator, the write data generator (WDG) and the MISR; the
// address generator and the WDG drive the RAM's address and write data; the
// MISR sees both the WDG's data and the RAM's read data and returns its
// signature to the controller, which raises ram_faulty. A test collar
// (multiplexer) sits in front of the RAM so that the system can use it in
// normal mode.
//
// Use: in normal mode (test low) sys_we / sys_rd / sys_addr / sys_wdata
// access the RAM, read data on sys_rdata one clock after sys_rd. Raising
// test starts one self-test; the RAM belongs to the BIST from the next
// clock until test is lowered after test_done. test_done is
// high after the 2 * 2^ADDR_W + 5-th clock edge, counting the edge that
// samples test high as the first (517 for 256 words);
// ram_faulty is valid while test_done is high. The test overwrites the RAM.
// signature shows the MISR, bist_state the controller state.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned      ADDR_W = bist_pkg::ADDR_W_DEF,
  parameter int unsigned      DATA_W = bist_pkg::DATA_W_DEF,
  parameter int unsigned      SIG_W  = bist_pkg::SIG_W_DEF,
  parameter logic [DATA_W-1:0] WDG_TAPS  = DATA_W'(bist_pkg::TAPS8_DEF),
  parameter logic [DATA_W-1:0] WDG_SEED  = DATA_W'(bist_pkg::SEED8_DEF),
  parameter logic [SIG_W-1:0]  MISR_TAPS = SIG_W'(bist_pkg::TAPS8_DEF)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              test,
  // normal-mode system port
  input  logic              sys_we,
  input  logic              sys_rd,
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_wdata,
  output logic [DATA_W-1:0] sys_rdata,
  // test result
  output logic              test_done,
  output logic              ram_faulty,
  output logic [SIG_W-1:0]  signature,
  output bist_state_e bist_state
);

  logic              addr_reset, addr_enable, adone;
  logic              wdg_reset, wdg_enable;
  logic              wr, rd, select1;
  logic              misr_reset, misr_enable;
  logic [ADDR_W-1:0] address;
  logic [DATA_W-1:0] data_wdg, data_ram, bist_rdata;
  logic              ram_we, ram_rd;
  logic [ADDR_W-1:0] ram_addr;
  logic [DATA_W-1:0] ram_wdata;
  logic              bist_active;

  bist_ctrl #(.SIG_W(SIG_W)) u_ctrl (
    .clk, .reset, .test, .adone,
    .sign_in     (signature),
    .addr_reset, .addr_enable, .wdg_reset, .wdg_enable,
    .wr, .rd, .select1, .misr_reset, .misr_enable,
    .ram_faulty, .test_done,
    .state       (bist_state)
  );

  addr_gen #(.ADDR_W(ADDR_W)) u_addr (
    .clk, .clr(addr_reset), .en(addr_enable), .address, .adone
  );

  wdg #(.W(DATA_W), .TAPS(WDG_TAPS), .SEED(WDG_SEED)) u_wdg (
    .clk, .clr(wdg_reset), .en(wdg_enable), .data_wdg
  );

  assign bist_active = (bist_state != ST_IDLE);

  test_collar #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_collar (
    .test_mode  (bist_active),
    .sys_we, .sys_rd, .sys_addr, .sys_wdata, .sys_rdata,
    .bist_we    (wr),
    .bist_rd    (rd),
    .bist_addr  (address),
    .bist_wdata (data_wdg),
    .bist_rdata (bist_rdata),
    .ram_we, .ram_rd, .ram_addr, .ram_wdata,
    .ram_rdata  (data_ram)
  );

  ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk, .we(ram_we), .rd(ram_rd), .address(ram_addr),
    .data_in(ram_wdata), .data_out(data_ram)
  );

  misr #(.SIG_W(SIG_W), .DATA_W(DATA_W), .TAPS(MISR_TAPS)) u_misr (
    .clk, .clr(misr_reset), .en(misr_enable), .select(select1),
    .data_wdg, .data_ram(bist_rdata), .signature
  );

endmodule
