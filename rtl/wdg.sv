// wdg: write data generator, a modular (internal-XOR, Galois) LFSR.
//
// Stages r0 .. r(W-1) shift from r0 towards r(W-1); the bit leaving r(W-1)
// is fed back into r0 and XORed into every stage ri whose TAPS bit i is
// set. This is the modular LFSR structure the source uses for test pattern
// generation. Stage r0 is data_wdg[W-1] and r(W-1) is data_wdg[0], so the
// word shifts towards its least significant bit, as in the source's
// pattern waveform. With a primitive polynomial and a non-zero SEED the
// output runs through all 2^W-1 non-zero words before it repeats. The
// polynomial (the one of the signature register, x^8 + x^7 + x^3 + x^2 + 1)
// and the seed are this design's own choices.
//
// Interface: clr (synchronous, has priority) reloads SEED; en advances one
// step per clock. data_wdg is the register itself, so a new pattern is
// visible one clock after the enabled edge.
module wdg #(
  parameter int unsigned    W    = bist_pkg::DATA_W_DEF,
  parameter logic [W-1:0]   TAPS = W'(bist_pkg::TAPS8_DEF),
  parameter logic [W-1:0]   SEED = W'(bist_pkg::SEED8_DEF)
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] data_wdg
);

  // stage ri is r_q[W-1-i]; the feedback r(W-1) is r_q[0]
  logic [W-1:0] r_q, r_next;

  always_comb begin
    r_next[W-1] = r_q[0];
    for (int i = 1; i < W; i++)
      r_next[W-1-i] = r_q[W-i] ^ (TAPS[i] & r_q[0]);
  end

  always_ff @(posedge clk) begin
    if (clr)     r_q <= SEED;
    else if (en) r_q <= r_next;
  end

  assign data_wdg = r_q;

  // A modular LFSR loaded with a non-zero seed never reaches all zeros.
  a_nonzero: assert property (@(posedge clk) clr |=> (r_q != '0));

endmodule
