// bist_ctrl: the BIST controller.
//
// While test (the test-mode input) is low the controller idles and the RAM
// belongs to the system. When test goes high it runs one test:
//   INIT    clears the address counter, the write data generator and MISR;
//   WRITE   for every address: writes the generated pattern (wr) and, with
//           select1 = 0, folds the same pattern into the MISR, so that the
//           MISR ends holding the signature a fault-free RAM must give;
//   LATCH   stores that reference signature and clears the MISR;
//   READ    for every address: reads the RAM (rd); with select1 = 1 the MISR
//           folds in each read word one clock later (RAM read latency);
//   DRAIN   folds in the last read word;
//   COMPARE sets ram_faulty when the RAM signature differs from the
//           reference;
//   DONE    holds ram_faulty with test_done high until test goes low.
// Enables are raised only in the states that need them, so idle blocks do
// not switch. Which blocks the controller enables, the test-mode input, the
// select between generated and read data and the faulty flag follow the
// source; the two-pass order, the on-chip reference register and the state
// encoding are this design's choices.
//
// Timing: counting the clock edge that samples test high as the first,
// test_done is high after edge 2 * N + 5, where N is the number of RAM
// words (517 for 256 words). Reset is synchronous and active high.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned SIG_W = bist_pkg::SIG_W_DEF
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             test,         // test mode (TM)
  input  logic             adone,        // last address reached
  input  logic [SIG_W-1:0] sign_in,      // MISR signature
  output logic             addr_reset,
  output logic             addr_enable,
  output logic             wdg_reset,
  output logic             wdg_enable,
  output logic             wr,
  output logic             rd,
  output logic             select1,      // 0: compress write data, 1: read data
  output logic             misr_reset,
  output logic             misr_enable,
  output logic             ram_faulty,
  output logic             test_done,
  output bist_state_e state
);

  bist_state_e state_q, state_d;
  logic [SIG_W-1:0] ref_sig_q;
  logic             rd_q;        // a read was issued last clock
  logic             faulty_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:    if (test)  state_d = ST_INIT;
      ST_INIT:               state_d = ST_WRITE;
      ST_WRITE:   if (adone) state_d = ST_LATCH;
      ST_LATCH:              state_d = ST_READ;
      ST_READ:    if (adone) state_d = ST_DRAIN;
      ST_DRAIN:              state_d = ST_COMPARE;
      ST_COMPARE:            state_d = ST_DONE;
      ST_DONE:    if (!test) state_d = ST_IDLE;
      default:               state_d = ST_IDLE;
    endcase
  end

  always_comb begin
    addr_reset  = (state_q == ST_INIT) || (state_q == ST_LATCH);
    wdg_reset   = (state_q == ST_INIT);
    misr_reset  = (state_q == ST_INIT) || (state_q == ST_LATCH);
    wr          = (state_q == ST_WRITE);
    rd          = (state_q == ST_READ);
    addr_enable = wr || rd;
    wdg_enable  = wr;
    select1     = (state_q == ST_READ) || (state_q == ST_DRAIN);
    misr_enable = wr || rd_q;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q   <= ST_IDLE;
      rd_q      <= 1'b0;
      ref_sig_q <= '0;
      faulty_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      rd_q    <= rd;
      if (state_q == ST_INIT)    faulty_q  <= 1'b0;
      if (state_q == ST_LATCH)   ref_sig_q <= sign_in;
      if (state_q == ST_COMPARE) faulty_q  <= (sign_in != ref_sig_q);
    end
  end

  assign ram_faulty = faulty_q;
  assign test_done  = (state_q == ST_DONE);
  assign state      = state_q;

  // The RAM is never written and read in the same cycle.
  a_wr_rd_excl: assert property (@(posedge clk) disable iff (reset) !(wr && rd));
  // The MISR compresses write data only while writing, read data only after a read.
  a_select: assert property (@(posedge clk) disable iff (reset)
                             misr_enable |-> (select1 == !wr));

endmodule
