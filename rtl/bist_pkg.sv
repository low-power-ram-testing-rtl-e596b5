// bist_pkg: constants and types shared by the RAM BIST blocks.
//
// The default geometry is a 256 x 8 RAM checked with an 8-bit signature,
// the configuration of the block diagram this design follows. The
// signature register uses x^8 + x^7 + x^3 + x^2 + 1 (primitive): it is the
// only polynomial that reproduces the signature trace printed for the
// source's MISR simulation. The pattern generator uses the same polynomial
// by this design's choice.
//
// Both registers are modular (internal-XOR) shift registers with stages
// r0 .. r(n-1). Stage r0 is the most significant bit of the output vector
// and r(n-1) its least significant bit, so the vector shifts towards bit 0.
// A TAPS vector has bit i set when the feedback from r(n-1) is XORed into
// the input of stage ri (bit 0, the wrap-around into r0, is always set).
package bist_pkg;

  localparam int unsigned ADDR_W_DEF = 8;   // 256 words
  localparam int unsigned DATA_W_DEF = 8;   // 8 bits per word
  localparam int unsigned SIG_W_DEF  = 8;   // 8-bit signature

  // x^8 + x^7 + x^3 + x^2 + 1 : taps into stages r0, r2, r3, r7
  localparam logic [7:0] TAPS8_DEF = 8'h8D;
  localparam logic [7:0] SEED8_DEF = 8'h01;

  // Controller states, in the order a test runs through them.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // normal mode, RAM owned by the system port
    ST_INIT    = 3'd1,  // clear address counter, pattern generator, MISR
    ST_WRITE   = 3'd2,  // write every address, compress the written data
    ST_LATCH   = 3'd3,  // keep the reference signature, clear the MISR
    ST_READ    = 3'd4,  // read every address
    ST_DRAIN   = 3'd5,  // compress the last read word (RAM read latency)
    ST_COMPARE = 3'd6,  // compare RAM signature with reference
    ST_DONE    = 3'd7   // result valid until test mode is left
  } bist_state_e;

endpackage
