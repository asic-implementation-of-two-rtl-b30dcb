// pp_gen_tb: exhaustive check of the partial-product generator.
//
// Every multiplicand and every 4-bit multiplier group is applied to two
// instances (offset 0 and offset 4). Each partial product is compared with
// a reference computed here by multiplying the multiplicand by the single
// bit's weight. Counts how many zero-bit (skipped) and one-bit partial
// products were seen; both must occur.
module pp_gen_tb;
  localparam int unsigned A_W = 8, GROUP = 4, P_W = 16;

  logic [A_W-1:0]   a;
  logic [GROUP-1:0] b_grp;
  logic [P_W-1:0]   pp0 [GROUP];
  logic [P_W-1:0]   pp4 [GROUP];
  int checks = 0, failures = 0, zeros = 0, ones = 0;

  pp_gen #(.A_W(A_W), .GROUP(GROUP), .OFFSET(0), .P_W(P_W)) dut0 (.a(a), .b_grp(b_grp), .pp(pp0));
  pp_gen #(.A_W(A_W), .GROUP(GROUP), .OFFSET(4), .P_W(P_W)) dut4 (.a(a), .b_grp(b_grp), .pp(pp4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        a = A_W'(ia);
        b_grp = GROUP'(ib);
        #1;
        for (int i = 0; i < GROUP; i++) begin
          int unsigned bit_i, exp0, exp4;
          bit_i = (ib >> i) & 1;
          exp0  = ia * bit_i * (1 << i);
          exp4  = ia * bit_i * (1 << (i + 4));
          if (bit_i == 0) zeros++; else ones++;
          checks += 2;
          if (pp0[i] !== P_W'(exp0)) begin
            failures++;
            if (failures < 10) $display("FAIL off0 a=%0d b=%0d i=%0d got %0d exp %0d", ia, ib, i, pp0[i], exp0);
          end
          if (pp4[i] !== P_W'(exp4)) begin
            failures++;
            if (failures < 10) $display("FAIL off4 a=%0d b=%0d i=%0d got %0d exp %0d", ia, ib, i, pp4[i], exp4);
          end
        end
      end
    end
    checks++;
    if (zeros == 0 || ones == 0) begin
      failures++;
      $display("FAIL: zero bits %0d, one bits %0d", zeros, ones);
    end
    $display("zero-bit partial products %0d, one-bit partial products %0d", zeros, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
