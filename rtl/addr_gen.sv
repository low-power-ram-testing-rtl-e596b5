// addr_gen: address generator of the BIST, a binary up-counter.
//
// The counter walks through all 2^ADDR_W RAM addresses, 0 first. adone is
// high while the counter holds the last address, so the controller knows
// that the access it is making now is the final one of a pass; the next
// enabled clock wraps the counter back to 0. The source gives the block's
// ports (clock, clear, enable, ADONE, ADDRESS); counting upwards in binary is
// this design's choice.
//
// Interface: clr is a synchronous clear with priority over en.
module addr_gen #(
  parameter int unsigned ADDR_W = bist_pkg::ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              en,
  output logic [ADDR_W-1:0] address,
  output logic              adone
);

  logic [ADDR_W-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (clr)     cnt_q <= '0;
    else if (en) cnt_q <= cnt_q + 1'b1;
  end

  assign address = cnt_q;
  assign adone   = (cnt_q == {ADDR_W{1'b1}});

endmodule
