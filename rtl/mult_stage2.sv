// mult_stage2: second stage of the two-stage pipelined multiplier.
//
// In the clock cycle after stage 1 it forms the partial products of the
// upper multiplier bits (bits 4-7 by default, weights GROUP..B_W-1) with
// pp_gen, adds them to the stage-1 partial sum with pp_adder, and registers
// the full A_W+B_W-bit product.
//
// Interface: s1_valid, s1_a, s1_b_hi, s1_sum in (from mult_stage1's
// register); out_valid, p out (registered).
// Timing: p and out_valid change on the rising clock edge after the stage-1
// register loaded, so an operation takes two cycles and one may enter every
// cycle. Asynchronous active-low reset clears out_valid and p; p loads only
// for a valid operation. Valid bit and reset are this design's own additions.
module mult_stage2 #(
  parameter int unsigned A_W   = mul_pkg::A_W_DEF,
  parameter int unsigned B_W   = mul_pkg::B_W_DEF,
  parameter int unsigned GROUP = mul_pkg::GROUP_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   s1_valid,
  input  logic [A_W-1:0]         s1_a,
  input  logic [B_W-GROUP-1:0]   s1_b_hi,
  input  logic [A_W+GROUP-1:0]   s1_sum,
  output logic                   out_valid,
  output logic [A_W+B_W-1:0]     p
);
  localparam int unsigned P_W  = A_W + B_W;
  localparam int unsigned HI_N = B_W - GROUP;

  logic [P_W-1:0] pp [HI_N];
  logic [P_W-1:0] sum;

  pp_gen #(.A_W(A_W), .GROUP(HI_N), .OFFSET(GROUP), .P_W(P_W)) u_pp_hi (
    .a    (s1_a),
    .b_grp(s1_b_hi),
    .pp   (pp)
  );

  pp_adder #(.GROUP(HI_N), .P_W(P_W)) u_add_hi (
    .sum_in (P_W'(s1_sum)),
    .pp     (pp),
    .sum_out(sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) p <= sum;
    end
  end
endmodule
