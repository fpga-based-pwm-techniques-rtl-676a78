// tb_counter_pwm_gen: self-checking testbench for counter_pwm_gen at its
// default 4-bit size.
//
// Applies the duty words shown in the board measurements (0100, 0110, 1100,
// 1000, 1111, 0010, 1001) plus 0 and random words, changing the word at
// random points inside a period. Reference: with the period phase k counted
// in the testbench (k = 0 in the first cycle after reset, period 16 cycles),
// the output must be high exactly for 1 <= k <= D, where D is the word
// present at k = 0; period_start must be high exactly at k = 0. Also counts
// the high cycles of each period against D (duty = D/16).
module tb_counter_pwm_gen;

  localparam int W = 4;
  localparam int P = 1 << W;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] duty;
  logic pwm, period_start;

  int checks = 0;
  int failures = 0;

  counter_pwm_gen dut (.clk(clk), .rst(rst), .duty(duty), .pwm(pwm), .period_start(period_start));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  int words[$] = '{4, 6, 12, 8, 15, 2, 9, 0};
  int k, d, highs;

  initial begin
    rst = 1'b1; duty = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 40; i++) words.push_back(int'($urandom % P));
    k = 0; highs = 0; d = 0;
    foreach (words[w]) begin
      for (int c = 0; c < 3 * P; c++) begin
        // switch to the next word at a random phase of the first period
        if (c == int'($urandom % P)) duty = W'(words[w]);
        if (c == P - 1) duty = W'(words[w]);
        #1;
        if (k == 0) begin
          if (c >= P) check("high cycles per period", highs, d);
          d = int'(duty);
          highs = 0;
        end
        check("period_start", int'(period_start), int'(k == 0));
        check("pwm", int'(pwm), int'(k >= 1 && k <= d));
        if (pwm) highs++;
        @(posedge clk);
        #1;
        k = (k + 1) % P;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
