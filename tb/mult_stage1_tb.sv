// mult_stage1_tb: checks the first pipeline stage.
//
// Random operands are presented with in_valid high or low. After each rising
// edge the stage register must hold, for a valid operation, the multiplicand,
// the upper four multiplier bits and a * b[3:0] (computed here), and must
// keep its previous data when in_valid was low. Also checks that reset
// clears the register.
module mult_stage1_tb;
  localparam int unsigned A_W = 8, B_W = 8, GROUP = 4;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [A_W-1:0]       a = '0;
  logic [B_W-1:0]       b = '0;
  logic                 s1_valid;
  logic [A_W-1:0]       s1_a;
  logic [B_W-GROUP-1:0] s1_b_hi;
  logic [A_W+GROUP-1:0] s1_sum;
  int checks = 0, failures = 0, holds = 0, loads = 0;

  mult_stage1 #(.A_W(A_W), .B_W(B_W), .GROUP(GROUP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int exp_a, exp_bhi, exp_sum;
    @(negedge clk);
    check("reset valid", int'(s1_valid), 0);
    check("reset sum", int'(s1_sum), 0);
    rst_n = 1'b1;
    exp_a = 0; exp_bhi = 0; exp_sum = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      a = A_W'($urandom);
      b = B_W'($urandom);
      if (in_valid) begin
        exp_a = int'(a); exp_bhi = int'(b) >> GROUP; exp_sum = int'(a) * (int'(b) & 15);
        loads++;
      end else holds++;
      @(posedge clk); #1;
      check("valid", int'(s1_valid), int'(in_valid));
      check("a", int'(s1_a), exp_a);
      check("b_hi", int'(s1_b_hi), exp_bhi);
      check("sum", int'(s1_sum), exp_sum);
    end
    // asynchronous reset in the middle of a cycle
    #2 rst_n = 1'b0; #1;
    check("async reset valid", int'(s1_valid), 0);
    check("async reset sum", int'(s1_sum), 0);
    $display("loads %0d holds %0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
