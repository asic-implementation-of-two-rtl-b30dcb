// mul_pkg: sizes shared by the blocks of the two-stage pipelined
// shift-and-add multiplier.
//
// The multiplier is 8 x 8 bits with a 16-bit product, and the 8 multiplier
// bits are split into two groups of four, one group per pipeline stage.
// These numbers are the defaults of every module's parameters; a module may
// still be built at other sizes through its own parameters.
package mul_pkg;
  localparam int unsigned A_W_DEF   = 8;                    // multiplicand bits
  localparam int unsigned B_W_DEF   = 8;                    // multiplier bits
  localparam int unsigned GROUP_DEF = 4;                    // multiplier bits per stage
  localparam int unsigned P_W_DEF   = A_W_DEF + B_W_DEF;    // product bits
endpackage
