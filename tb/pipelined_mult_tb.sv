// pipelined_mult_tb: end-to-end test of the two-stage pipelined multiplier
// at its default size (8 x 8 -> 16 bits).
//
// Every one of the 65,536 operand pairs is multiplied once, in shuffled
// order, mostly back to back with random gaps (in_valid low). A scoreboard
// holds each issued operation with its issue cycle; every product that comes
// out is compared with a * b computed here, and its latency must be exactly
// two cycles. A burst of back-to-back operations must give one product per
// cycle. Finally the pipeline is reset while full and must come out empty.
// Mechanisms counted (each must occur): back-to-back issue, gaps, a low
// multiplier half of zero (all stage-1 partial products skipped), a high half
// of zero (all stage-2 partial products skipped), both halves non-zero, and
// the reset flush.
module pipelined_mult_tb;
  localparam int unsigned LATENCY = 2;
  localparam int unsigned N_OPS   = 65536;

  typedef struct {
    int unsigned a;
    int unsigned b;
    longint      cyc;
  } op_t;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0]  a = '0, b = '0;
  logic        out_valid;
  logic [15:0] p;

  longint cyc = 0;
  op_t    sb[$];
  int checks = 0, failures = 0, done = 0;
  int n_b2b = 0, n_gap = 0, n_lo_zero = 0, n_hi_zero = 0, n_both = 0, n_flush = 0;
  int burst_run = 0, max_run = 0;

  pipelined_mult dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s at cycle %0d", msg, cyc);
  endtask

  // Output monitor, just before the inputs change.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      checks++;
      if (sb.size() == 0) fail("product with no operation issued");
      else begin
        o = sb.pop_front();
        if (int'(p) != int'(o.a * o.b))
          fail($sformatf("%0d * %0d gave %0d", o.a, o.b, p));
        checks++;
        if (cyc - o.cyc != longint'(LATENCY))
          fail($sformatf("latency %0d", cyc - o.cyc));
        done++;
      end
      burst_run++;
      if (burst_run > max_run) max_run = burst_run;
    end else burst_run = 0;
  end

  initial begin
    int unsigned order [N_OPS];
    bit prev_valid;
    for (int i = 0; i < N_OPS; i++) order[i] = i;
    for (int i = N_OPS - 1; i > 0; i--) begin
      int j;
      int unsigned t;
      j = $urandom % (i + 1);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_valid = 1'b0;

    // shuffled exhaustive run; the first 200 operations go back to back
    for (int k = 0; k < N_OPS; ) begin
      @(negedge clk);
      if (k >= 200 && ($urandom % 8) == 0) begin
        in_valid = 1'b0;
        a = 8'($urandom); b = 8'($urandom);
        n_gap++;
        prev_valid = 1'b0;
      end else begin
        a = 8'(order[k] >> 8);
        b = 8'(order[k]);
        in_valid = 1'b1;
        sb.push_back('{a: int'(a), b: int'(b), cyc: cyc});
        if (prev_valid) n_b2b++;
        if (b[3:0] == 0) n_lo_zero++;
        if (b[7:4] == 0) n_hi_zero++;
        if (b[3:0] != 0 && b[7:4] != 0) n_both++;
        prev_valid = 1'b1;
        k++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0) fail($sformatf("%0d operations never came out", sb.size()));
    checks++;
    if (done != N_OPS) fail($sformatf("%0d products for %0d operations", done, N_OPS));
    checks++;
    if (max_run < 200) fail($sformatf("longest product burst %0d, want 200", max_run));

    // reset with both pipeline registers full: nothing may come out
    @(negedge clk);
    in_valid = 1'b1; a = 8'd200; b = 8'd100;
    @(negedge clk);
    a = 8'd17; b = 8'd3;
    @(posedge clk); #1;
    rst_n = 1'b0;
    #1;
    checks++;
    if (out_valid !== 1'b0) fail("out_valid survived reset");
    else n_flush++;
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b1;
    sb.delete();
    repeat (LATENCY + 2) begin
      @(negedge clk);
      checks++;
      if (out_valid) fail("product after reset flush");
    end

    $display("ops %0d  back-to-back %0d  gaps %0d  low-half zero %0d  high-half zero %0d  both halves %0d  flush %0d  longest burst %0d",
             done, n_b2b, n_gap, n_lo_zero, n_hi_zero, n_both, n_flush, max_run);
    checks++; if (n_b2b == 0)     fail("no back-to-back issue");
    checks++; if (n_gap == 0)     fail("no gap");
    checks++; if (n_lo_zero == 0) fail("no zero low half");
    checks++; if (n_hi_zero == 0) fail("no zero high half");
    checks++; if (n_both == 0)    fail("no operation with both halves non-zero");
    checks++; if (n_flush == 0)   fail("no reset flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
