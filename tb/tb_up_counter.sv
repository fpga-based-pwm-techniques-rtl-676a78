// tb_up_counter: self-checking testbench for up_counter.
//
// Drives the enable with a random pattern and compares count, carry and
// overflow in every cycle with a reference kept in the testbench: the count
// advances when enabled and wraps at 2**WIDTH, carry is high in the enabled
// cycle holding all ones, overflow is high in the cycle after a wrap (and in
// the first cycle after reset). Runs WIDTH = 4 and WIDTH = 3.
module tb_up_counter;

  logic clk = 1'b0;
  logic rst;
  logic en4, en3;
  logic [3:0] count4;
  logic [2:0] count3;
  logic carry4, ovf4, carry3, ovf3;

  int checks = 0;
  int failures = 0;
  int wraps = 0;

  up_counter #(.WIDTH(4)) dut4 (.clk(clk), .rst(rst), .en(en4), .count(count4), .carry(carry4), .overflow(ovf4));
  up_counter #(.WIDTH(3)) dut3 (.clk(clk), .rst(rst), .en(en3), .count(count3), .carry(carry3), .overflow(ovf3));

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

  int m4, m3;
  bit o4, o3;

  initial begin
    rst = 1'b1; en4 = 1'b0; en3 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    m4 = 0; m3 = 0; o4 = 1'b1; o3 = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      en4 = (i < 100) ? 1'b1 : 1'(($urandom % 4) != 0);
      en3 = 1'($urandom % 2);
      #1;
      check("count4", int'(count4), m4);
      check("count3", int'(count3), m3);
      check("carry4", int'(carry4), int'(en4 && m4 == 15));
      check("carry3", int'(carry3), int'(en3 && m3 == 7));
      check("ovf4", int'(ovf4), int'(o4));
      check("ovf3", int'(ovf3), int'(o3));
      o4 = en4 && m4 == 15;
      o3 = en3 && m3 == 7;
      if (o4) wraps++;
      if (en4) m4 = (m4 + 1) % 16;
      if (en3) m3 = (m3 + 1) % 8;
      @(posedge clk);
      #1;
    end
    check("wraps seen", int'(wraps > 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
