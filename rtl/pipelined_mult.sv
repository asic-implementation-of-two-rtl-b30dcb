// pipelined_mult: unsigned A_W x B_W two-stage pipelined shift-and-add
// multiplier (8 x 8 -> 16 bits by default).
//
// The multiplier operand b is split in two halves. Stage 1 forms and sums
// the partial products of the low half (bits 0-3) in one cycle; a pipeline
// register then holds the partial sum with the multiplicand and the high
// half of b; stage 2 forms the partial products of the high half (bits 4-7)
// in the next cycle, adds them to the partial sum and registers the 16-bit
// product. Each stage does half of the shift-and-add work, which is what
// halves the critical path against a single-cycle version of the same
// multiplier.
//
// Interface: in_valid, a, b in; out_valid, p out.
// Timing: p = a * b appears with out_valid two rising clock edges after the
// operands were presented with in_valid; a new operation may be presented
// every cycle, and gaps (in_valid low) travel through as out_valid low.
// Asynchronous active-low reset. The split into two halves of four bits and
// the 8/16-bit widths follow the design description; the valid flag, the
// reset, the registered output and the operands being unsigned are this
// design's own choices.
module pipelined_mult #(
  parameter int unsigned A_W   = mul_pkg::A_W_DEF,
  parameter int unsigned B_W   = mul_pkg::B_W_DEF,
  parameter int unsigned GROUP = mul_pkg::GROUP_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic               out_valid,
  output logic [A_W+B_W-1:0] p
);
  initial assert (GROUP > 0 && GROUP < B_W)
    else $error("pipelined_mult: GROUP must split B_W into two non-empty parts");

  logic                 s1_valid;
  logic [A_W-1:0]       s1_a;
  logic [B_W-GROUP-1:0] s1_b_hi;
  logic [A_W+GROUP-1:0] s1_sum;

  mult_stage1 #(.A_W(A_W), .B_W(B_W), .GROUP(GROUP)) u_stage1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid),
    .a       (a),
    .b       (b),
    .s1_valid(s1_valid),
    .s1_a    (s1_a),
    .s1_b_hi (s1_b_hi),
    .s1_sum  (s1_sum)
  );

  mult_stage2 #(.A_W(A_W), .B_W(B_W), .GROUP(GROUP)) u_stage2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .s1_valid (s1_valid),
    .s1_a     (s1_a),
    .s1_b_hi  (s1_b_hi),
    .s1_sum   (s1_sum),
    .out_valid(out_valid),
    .p        (p)
  );
endmodule
