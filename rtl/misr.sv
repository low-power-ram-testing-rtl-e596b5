// misr: multiple-input signature register.
//
// A modular LFSR of SIG_W stages r0 .. r(SIG_W-1) whose stage ri also takes
// input bit Mi:
//   r0' = r(SIG_W-1) ^ M0
//   ri' = r(i-1) ^ (TAPS[i] & r(SIG_W-1)) ^ Mi
// Each enabled clock folds one DATA_W-bit word into the signature, so a
// whole RAM pass is reduced to one SIG_W-bit value. Stage r0 is
// signature[SIG_W-1] and the word enters most significant bit first
// (M0 = word[DATA_W-1]); a word narrower than the register feeds the upper
// stages only. With these bit positions and TAPS = x^8 + x^7 + x^3 + x^2 + 1
// the register reproduces the signature sequence the source prints for its
// MISR simulation (4-bit data 1010 into an 8-bit register). The word is
// chosen by select: 0 takes the generated write data (data_wdg), from which
// the fault-free reference signature is formed; 1 takes the RAM read data
// (data_ram). The structure and the select input follow the source.
//
// Interface: clr (synchronous, priority) clears the register to 0; en
// compresses the selected word on the clock edge.
module misr #(
  parameter int unsigned      SIG_W  = bist_pkg::SIG_W_DEF,
  parameter int unsigned      DATA_W = bist_pkg::DATA_W_DEF,
  parameter logic [SIG_W-1:0] TAPS   = SIG_W'(bist_pkg::TAPS8_DEF)
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              en,
  input  logic              select,
  input  logic [DATA_W-1:0] data_wdg,
  input  logic [DATA_W-1:0] data_ram,
  output logic [SIG_W-1:0]  signature
);

  // stage ri is r_q[SIG_W-1-i] and its input Mi is m[SIG_W-1-i]; the
  // feedback r(SIG_W-1) is r_q[0]
  logic [SIG_W-1:0]  r_q, r_next, m;
  logic [DATA_W-1:0] word;

  always_comb begin
    word = select ? data_ram : data_wdg;
    m    = SIG_W'(word) << (SIG_W - DATA_W);
    r_next[SIG_W-1] = r_q[0] ^ m[SIG_W-1];
    for (int i = 1; i < SIG_W; i++)
      r_next[SIG_W-1-i] = r_q[SIG_W-i] ^ (TAPS[i] & r_q[0]) ^ m[SIG_W-1-i];
  end

  always_ff @(posedge clk) begin
    if (clr)     r_q <= '0;
    else if (en) r_q <= r_next;
  end

  assign signature = r_q;

  initial begin
    assert (DATA_W <= SIG_W)
      else $error("misr: DATA_W (%0d) wider than SIG_W (%0d)", DATA_W, SIG_W);
  end

endmodule
