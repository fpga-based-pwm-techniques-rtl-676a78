// counter_pwm_gen: counter based PWM generator built around a down counter.
//
// A free-running WIDTH-bit period counter divides the clock down to the
// switching frequency (period 2**WIDTH cycles). At the start of each period
// its overflow acts as the Load pulse: the N-bit down counter is loaded with
// the duty word and the RS latch is set. The down counter then counts down
// once per clock and stops at zero. A zero detector (all count bits
// zero) resets the latch when the count reaches zero, and the D
// flip-flop holds the latch state, which is the PWM output.
//
// Timing: the output is high for exactly `duty` cycles, starting in the
// second cycle of a period, so duty cycle = duty / 2**WIDTH (0 to
// (2**WIDTH-1)/2**WIDTH). The zero detector looks at the value the counter
// takes at the coming clock edge, so the reset lands on the right cycle; with
// duty = 0 it fires together with the load and, reset winning, the output
// stays low. The duty word is sampled only at the Load pulse.
// `period_start` is high in the first cycle of every period.
//
// The document gives the down counter, the zero detector, the D flip-flop and
// the RS latch (Fig. 15) and the duty formula K/16 for a 4-bit word. It does
// not give the switching-frequency divider; a WIDTH-bit up counter is this
// design's choice, as is folding the latch and the D flip-flop into one
// clocked flip-flop.
module counter_pwm_gen
  import pwm_pkg::*;
#(
  parameter int unsigned WIDTH = CB_WIDTH_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] duty,
  output logic             pwm,
  output logic             period_start
);

  logic             load;
  logic [WIDTH-1:0] down_count;
  logic [WIDTH-1:0] down_next;
  logic             zero;

  up_counter #(.WIDTH(WIDTH)) u_period (
    .clk      (clk),
    .rst      (rst),
    .en       (1'b1),
    .count    (),
    .carry    (),
    .overflow (load)
  );

  // N-bit down counter with parallel load, holding at zero.
  always_comb begin
    if (load)                 down_next = duty;
    else if (down_count != 0) down_next = down_count - 1'b1;
    else                      down_next = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) down_count <= '0;
    else     down_count <= down_next;
  end

  // Zero detector.
  assign zero = &(~down_next);

  // RS latch: set by Load, reset by the zero detector, held in the D flip-flop.
  always_ff @(posedge clk) begin
    if (rst) pwm <= 1'b0;
    else     pwm <= rs_next(pwm, load, zero);
  end

  assign period_start = load;

endmodule
