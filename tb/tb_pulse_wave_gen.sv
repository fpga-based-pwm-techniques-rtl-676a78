// tb_pulse_wave_gen: self-checking testbench for pulse_wave_gen.
//
// Two instances (HALF_PERIODS = 5 and 1) get random tick pulses. The
// testbench counts the ticks itself: the output must toggle on the clock
// edge ending every HALF_PERIODS-th tick cycle and hold otherwise.
module tb_pulse_wave_gen;

  logic clk = 1'b0;
  logic rst;
  logic tick;
  logic pulse5, pulse1;

  int checks = 0;
  int failures = 0;

  pulse_wave_gen #(.HALF_PERIODS(5)) dut5 (.clk(clk), .rst(rst), .tick(tick), .pulse(pulse5));
  pulse_wave_gen #(.HALF_PERIODS(1)) dut1 (.clk(clk), .rst(rst), .tick(tick), .pulse(pulse1));

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

  int ticks, toggles;
  bit e5, e1;

  initial begin
    rst = 1'b1; tick = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ticks = 0; toggles = 0; e5 = 1'b0; e1 = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      tick = 1'(($urandom % 3) == 0);
      #1;
      check("pulse HALF_PERIODS=5", int'(pulse5), int'(e5));
      check("pulse HALF_PERIODS=1", int'(pulse1), int'(e1));
      if (tick) begin
        ticks++;
        e1 = !e1;
        if (ticks % 5 == 0) begin e5 = !e5; toggles++; end
      end
      @(posedge clk);
      #1;
    end
    check("toggles seen", int'(toggles > 20), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
