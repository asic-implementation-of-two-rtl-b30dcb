// pp_adder_tb: random check of the adder block.
//
// Drives random running sums and partial products, including all-ones
// values that make carries ripple across the whole word, and compares the
// sum with a reference added here in 32-bit arithmetic and cut to 16 bits.
module pp_adder_tb;
  localparam int unsigned GROUP = 4, P_W = 16;

  logic [P_W-1:0] sum_in, sum_out;
  logic [P_W-1:0] pp [GROUP];
  int checks = 0, failures = 0;

  pp_adder #(.GROUP(GROUP), .P_W(P_W)) dut (.sum_in(sum_in), .pp(pp), .sum_out(sum_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int unsigned ref_sum;
      sum_in = (n % 7 == 0) ? '1 : P_W'($urandom);
      for (int i = 0; i < GROUP; i++) pp[i] = (n % 11 == i) ? '1 : P_W'($urandom >> (n % 9));
      #1;
      ref_sum = 32'(sum_in);
      for (int i = 0; i < GROUP; i++) ref_sum += 32'(pp[i]);
      checks++;
      if (sum_out !== P_W'(ref_sum)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %h exp %h", n, sum_out, P_W'(ref_sum));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
