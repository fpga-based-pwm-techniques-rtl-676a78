// cascaded_pwm_gen: cascaded counter based PWM generator.
//
// Two DIGIT_WIDTH-bit (default 4) counters share the clock. The low counter
// runs freely and its overflow enables the high counter, so together they
// form one 2*DIGIT_WIDTH-bit counter whose value {high, low} drives the A
// input of an equality comparator. The duty word drives the B input. The high
// counter's overflow sets the RS latch at the start of each period and the
// comparator's EQUAL output resets it; the latch output is the PWM signal.
//
// Timing: the period is 2**(2*DIGIT_WIDTH) cycles. The latch is a clocked,
// reset-dominant flip-flop and the high counter's overflow is registered, so
// the output is high for exactly `duty` cycles from the second cycle of a
// period: duty cycle = duty / 2**(2*DIGIT_WIDTH). The duty word is not
// registered (the document lists no duty register for this generator), so it
// should change only near the start of a period. `period_start` is high in
// the first cycle of every period.
//
// The structure follows the document; overflow timing, reset priority and
// reset behaviour are this design's choices.
module cascaded_pwm_gen
  import pwm_pkg::*;
#(
  parameter int unsigned DIGIT_WIDTH = CC_DIGIT_WIDTH_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [2*DIGIT_WIDTH-1:0] duty,
  output logic                     pwm,
  output logic                     period_start
);

  logic [DIGIT_WIDTH-1:0] low_count;
  logic [DIGIT_WIDTH-1:0] high_count;
  logic                   low_carry;
  logic                   high_overflow;
  logic                   equal;

  up_counter #(.WIDTH(DIGIT_WIDTH)) u_low (
    .clk      (clk),
    .rst      (rst),
    .en       (1'b1),
    .count    (low_count),
    .carry    (low_carry),
    .overflow ()
  );

  up_counter #(.WIDTH(DIGIT_WIDTH)) u_high (
    .clk      (clk),
    .rst      (rst),
    .en       (low_carry),
    .count    (high_count),
    .carry    (),
    .overflow (high_overflow)
  );

  // 2*DIGIT_WIDTH-bit comparator, A = {high, low}, B = duty.
  assign equal = ({high_count, low_count} == duty);

  // RS latch: set by the high counter's overflow, reset by EQUAL.
  always_ff @(posedge clk) begin
    if (rst) pwm <= 1'b0;
    else     pwm <= rs_next(pwm, high_overflow, equal);
  end

  assign period_start = high_overflow;

endmodule
