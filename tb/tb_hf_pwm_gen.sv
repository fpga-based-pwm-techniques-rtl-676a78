// tb_hf_pwm_gen: self-checking testbench for hf_pwm_gen at its default 8-bit
// size, in both latch wirings.
//
// The duty word changes at random points. Reference, with the period phase k
// counted in the testbench (k = 0 in the first cycle after reset, period 256
// cycles) and D the word present at k = P-1 of the previous period (0 in the
// first period):
//   MATCH_SETS = 1: pwm(k) = D != 0 && k > D for k >= 1, and
//                   pwm(0) = (previous period's D != 0)
//   MATCH_SETS = 0: pwm(k) = 1 <= k <= D
// period_start must be high exactly at k = 0.
module tb_hf_pwm_gen;

  localparam int W = 8;
  localparam int P = 1 << W;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] duty;
  logic pwm1, ps1, pwm0, ps0;

  int checks = 0;
  int failures = 0;

  hf_pwm_gen #(.MATCH_SETS(1'b1)) dut1 (.clk(clk), .rst(rst), .duty(duty), .pwm(pwm1), .period_start(ps1));
  hf_pwm_gen #(.MATCH_SETS(1'b0)) dut0 (.clk(clk), .rst(rst), .duty(duty), .pwm(pwm0), .period_start(ps0));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int words[$] = '{64, 0, 96, 192, 255, 128, 1, 254, 32};
  int k, d, d_prev, d_next, highs1, highs0;

  initial begin
    rst = 1'b1; duty = 8'd17;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 40; i++) words.push_back(int'($urandom % P));
    k = 0; d = 0; d_prev = 0; highs1 = 0; highs0 = 0;
    foreach (words[w]) begin
      for (int c = 0; c < 2 * P; c++) begin
        if (c == 37) duty = W'(words[w]);
        #1;
        if (k == 1) begin
          // high cycles over the last window k = 1 .. P: 2**W - D (D >= 1) or D
          if (c >= P) begin
            check("highs MATCH_SETS=1", highs1, (d_prev == 0) ? 0 : P - d_prev);
            check("highs MATCH_SETS=0", highs0, d_prev);
          end
          highs1 = 0; highs0 = 0;
        end
        check("period_start 1", int'(ps1), int'(k == 0));
        check("period_start 0", int'(ps0), int'(k == 0));
        check("pwm MATCH_SETS=1", int'(pwm1), (k == 0) ? int'(d_prev != 0) : int'(d != 0 && k > d));
        check("pwm MATCH_SETS=0", int'(pwm0), int'(k >= 1 && k <= d));
        if (k == P - 1) d_next = int'(duty);
        @(posedge clk);
        #1;
        k = (k + 1) % P;
        if (k == 0) begin d_prev = d; d = d_next; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-period high counts over the window k = 1 .. P (k = P is the next k = 0)
  always @(negedge clk) begin
    if (!rst) begin
      if (pwm1) highs1++;
      if (pwm0) highs0++;
    end
  end

endmodule
