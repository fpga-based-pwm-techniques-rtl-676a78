// tb_inverter_gate_drive: self-checking testbench for inverter_gate_drive.
//
// Drives random PWM levels and random period ticks into an instance with
// HALF_PERIODS = 3. The testbench tracks the pulse wave itself (toggle after
// every third tick) and checks every cycle that S1 = S3 = pwm AND pulse,
// S2 = S4 = pwm AND NOT pulse, and that no bridge leg has both switches on.
// It counts cycles that drive the load positively and negatively.
module tb_inverter_gate_drive;

  import pwm_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic pwm, tick, pulse;
  gate_t gates;

  int checks = 0;
  int failures = 0;

  inverter_gate_drive #(.HALF_PERIODS(3)) dut (
    .clk(clk), .rst(rst), .pwm(pwm), .tick(tick), .pulse(pulse), .gates(gates));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  int ticks, pos, neg;
  bit p;

  initial begin
    rst = 1'b1; pwm = 1'b0; tick = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ticks = 0; pos = 0; neg = 0; p = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      pwm  = 1'($urandom % 2);
      tick = 1'(($urandom % 4) == 0);
      #1;
      check("pulse", int'(pulse), int'(p));
      check("s1", int'(gates.s1), int'(pwm && p));
      check("s3", int'(gates.s3), int'(pwm && p));
      check("s2", int'(gates.s2), int'(pwm && !p));
      check("s4", int'(gates.s4), int'(pwm && !p));
      check("leg 1", int'(gates.s1 && gates.s2), 0);
      check("leg 2", int'(gates.s4 && gates.s3), 0);
      if (gates.s1 && gates.s3) pos++;
      if (gates.s2 && gates.s4) neg++;
      if (tick) begin
        ticks++;
        if (ticks % 3 == 0) p = !p;
      end
      @(posedge clk);
      #1;
    end
    check("positive and negative drive seen", int'(pos > 50 && neg > 50), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
