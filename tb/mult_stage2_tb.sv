// mult_stage2_tb: checks the second pipeline stage.
//
// Plays the part of the stage-1 register: presents a multiplicand, four
// upper multiplier bits and a partial sum with s1_valid, and checks that one
// rising edge later p = s1_sum + (s1_a * s1_b_hi) * 16 (computed here) with
// out_valid set, and that p holds its value when s1_valid was low.
module mult_stage2_tb;
  localparam int unsigned A_W = 8, B_W = 8, GROUP = 4;

  logic clk = 1'b0, rst_n = 1'b0, s1_valid = 1'b0;
  logic [A_W-1:0]       s1_a = '0;
  logic [B_W-GROUP-1:0] s1_b_hi = '0;
  logic [A_W+GROUP-1:0] s1_sum = '0;
  logic                 out_valid;
  logic [A_W+B_W-1:0]   p;
  int checks = 0, failures = 0;

  mult_stage2 #(.A_W(A_W), .B_W(B_W), .GROUP(GROUP)) dut (.*);

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
    int exp_p;
    @(negedge clk);
    check("reset valid", int'(out_valid), 0);
    check("reset p", int'(p), 0);
    rst_n = 1'b1;
    exp_p = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      s1_valid = ($urandom % 4) != 0;
      s1_a     = A_W'($urandom);
      s1_b_hi  = (B_W-GROUP)'($urandom);
      // a genuine stage-1 sum is a * b_lo with b_lo < 16
      s1_sum   = (A_W+GROUP)'(int'(A_W'($urandom)) * ($urandom % 16));
      if (s1_valid) exp_p = int'(s1_sum) + int'(s1_a) * int'(s1_b_hi) * 16;
      @(posedge clk); #1;
      check("valid", int'(out_valid), int'(s1_valid));
      check("p", int'(p), exp_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
