// pp_gen: partial-product generator of the shift-and-add multiplier.
//
// For each of the GROUP multiplier bits it is given, a control check looks at
// the bit: when it is 1 the partial product is the multiplicand shifted left
// to that bit's weight (OFFSET + i), when it is 0 the partial product is zero
// and no addition is needed for it. This is the shift-and-add rule, with the
// one-bit-per-step shift of the serial algorithm laid out as fixed wiring so
// that a whole group of partial products is formed in one clock cycle.
//
// Interface: a (multiplicand), b_grp (the multiplier bits OFFSET ..
// OFFSET+GROUP-1); pp[i] = b_grp[i] ? a << (OFFSET+i) : 0, P_W bits wide.
// Timing: purely combinational. The bits of pp[i] below weight OFFSET+i and
// above OFFSET+i+A_W-1 are constant zero by construction; synthesis keeps
// only the A_W AND gates of each partial product.
module pp_gen #(
  parameter int unsigned A_W    = mul_pkg::A_W_DEF,
  parameter int unsigned GROUP  = mul_pkg::GROUP_DEF,
  parameter int unsigned OFFSET = 0,
  parameter int unsigned P_W    = mul_pkg::P_W_DEF
) (
  input  logic [A_W-1:0]   a,
  input  logic [GROUP-1:0] b_grp,
  output logic [P_W-1:0]   pp [GROUP]
);
  initial assert (A_W + OFFSET + GROUP - 1 <= P_W)
    else $error("pp_gen: product width %0d too small", P_W);

  logic [P_W-1:0] a_ext;
  assign a_ext = P_W'(a);

  always_comb begin
    for (int unsigned i = 0; i < GROUP; i++) begin
      // control: a partial product exists only for a 1 bit of the multiplier
      pp[i] = b_grp[i] ? (a_ext << (OFFSET + i)) : '0;
    end
  end
endmodule
