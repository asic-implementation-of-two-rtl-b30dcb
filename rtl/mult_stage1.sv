// mult_stage1: first stage of the two-stage pipelined multiplier.
//
// In one clock cycle it forms the partial products of the low GROUP
// multiplier bits (bits 0-3 by default) with pp_gen, sums them with pp_adder,
// and captures, in the pipeline register between the stages, everything the
// second stage still needs: the valid bit, the multiplicand, the upper
// multiplier bits and the partial sum. The partial sum a * b[GROUP-1:0] needs
// only A_W+GROUP bits, so the register holds no more.
//
// Interface: in_valid/a/b in; s1_valid, s1_a, s1_b_hi, s1_sum out (registered).
// Timing: operands enter straight from the ports; the register loads on the
// rising clock edge. The valid bit and the data registers are cleared by the
// asynchronous active-low reset; data registers load only when in_valid is
// high. The valid bit and the reset are this design's own additions.
module mult_stage1 #(
  parameter int unsigned A_W   = mul_pkg::A_W_DEF,
  parameter int unsigned B_W   = mul_pkg::B_W_DEF,
  parameter int unsigned GROUP = mul_pkg::GROUP_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [A_W-1:0]         a,
  input  logic [B_W-1:0]         b,
  output logic                   s1_valid,
  output logic [A_W-1:0]         s1_a,
  output logic [B_W-GROUP-1:0]   s1_b_hi,
  output logic [A_W+GROUP-1:0]   s1_sum
);
  localparam int unsigned SUM_W = A_W + GROUP;

  logic [SUM_W-1:0] pp [GROUP];
  logic [SUM_W-1:0] sum;

  pp_gen #(.A_W(A_W), .GROUP(GROUP), .OFFSET(0), .P_W(SUM_W)) u_pp_lo (
    .a    (a),
    .b_grp(b[GROUP-1:0]),
    .pp   (pp)
  );

  pp_adder #(.GROUP(GROUP), .P_W(SUM_W)) u_add_lo (
    .sum_in ('0),
    .pp     (pp),
    .sum_out(sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_a     <= '0;
      s1_b_hi  <= '0;
      s1_sum   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_a    <= a;
        s1_b_hi <= b[B_W-1:GROUP];
        s1_sum  <= sum;
      end
    end
  end
endmodule
