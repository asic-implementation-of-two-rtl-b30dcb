// pp_adder: adder block of the shift-and-add multiplier.
//
// Adds a running partial sum and GROUP partial products into one P_W-bit
// sum (modulo 2^P_W; at the multiplier's sizes nothing is lost). The adders
// are written as a plain chain of word additions and the synthesis tool picks
// the adder structure; the adder's inner organisation is this design's own
// choice.
//
// Interface: sum_in, pp[GROUP] in; sum_out = sum_in + sum of pp[i].
// Timing: purely combinational.
module pp_adder #(
  parameter int unsigned GROUP = mul_pkg::GROUP_DEF,
  parameter int unsigned P_W   = mul_pkg::P_W_DEF
) (
  input  logic [P_W-1:0] sum_in,
  input  logic [P_W-1:0] pp [GROUP],
  output logic [P_W-1:0] sum_out
);
  always_comb begin
    sum_out = sum_in;
    for (int unsigned i = 0; i < GROUP; i++) begin
      sum_out = sum_out + pp[i];
    end
  end
endmodule
