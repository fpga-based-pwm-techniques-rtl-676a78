// tb_cascaded_pwm_gen: self-checking testbench for cascaded_pwm_gen at its
// default size (two 4-bit counters, period 256 cycles).
//
// The duty word is changed only in the first cycle of a period (the block has
// no duty register). Reference, with the period phase k counted in the
// testbench (k = 0 in the first cycle after reset): pwm(k) = 1 <= k <= D and
// period_start = (k == 0); the high cycles of each period must equal D, so
// the duty cycle is D/256. Words include 0, 1, 255 and the values whose
// match falls on a low-counter wrap (15, 16, 240).
module tb_cascaded_pwm_gen;

  localparam int W = 8;
  localparam int P = 1 << W;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] duty;
  logic pwm, period_start;

  int checks = 0;
  int failures = 0;

  cascaded_pwm_gen dut (.clk(clk), .rst(rst), .duty(duty), .pwm(pwm), .period_start(period_start));

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

  int words[$] = '{64, 0, 96, 192, 255, 128, 1, 15, 16, 240};
  int k, d, highs;

  initial begin
    rst = 1'b1; duty = 8'd0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 40; i++) words.push_back(int'($urandom % P));
    k = 0; d = 0; highs = 0;
    foreach (words[w]) begin
      for (int c = 0; c < 2 * P; c++) begin
        if (c == 0) duty = W'(words[w]);
        #1;
        if (k == 0) begin
          if (w > 0 || c > 0) check("high cycles per period", highs, d);
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
