// hf_pwm_gen: high frequency counter based PWM generator.
//
// A free-running WIDTH-bit counter is compared with a duty register. The
// comparator's EQUAL output and the counter's overflow drive an RS latch
// whose output is the PWM signal. The counter overflow also loads the next
// duty word into the register, so a new word takes effect only at a period
// boundary. The PWM period is 2**WIDTH clock cycles.
//
// Latch wiring (MATCH_SETS):
//   1 (default) - EQUAL sets, overflow resets, as the block description and
//                 block diagram have it. The output is high from the match to
//                 the end of the period: 2**WIDTH - duty cycles per period
//                 for duty >= 1, and constantly low for duty = 0.
//   0           - overflow sets, EQUAL resets, as the synthesized schematic
//                 of the same generator is wired. The output is high for
//                 exactly `duty` cycles at the start of each period, i.e.
//                 duty cycle = duty / 2**WIDTH.
//
// Timing: the register loads on the counter's carry (the cycle before the
// wrap), so the new word is already compared in the first cycle of the next
// period. The latch is a clocked, reset-dominant flip-flop (pwm_pkg::rs_next),
// and the output changes one clock after the event that sets or resets it.
// `period_start` is high in the first cycle of every period.
// These timing details are this design's own choices.
module hf_pwm_gen
  import pwm_pkg::*;
#(
  parameter int unsigned WIDTH      = HF_WIDTH_DEFAULT,
  parameter bit          MATCH_SETS = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] duty,
  output logic             pwm,
  output logic             period_start
);

  logic [WIDTH-1:0] count;
  logic             carry;
  logic             overflow;
  logic [WIDTH-1:0] duty_reg;
  logic             equal;
  logic             set_in;
  logic             reset_in;

  up_counter #(.WIDTH(WIDTH)) u_counter (
    .clk      (clk),
    .rst      (rst),
    .en       (1'b1),
    .count    (count),
    .carry    (carry),
    .overflow (overflow)
  );

  // N-bit duty register, loaded on counter overflow.
  always_ff @(posedge clk) begin
    if (rst)        duty_reg <= '0;
    else if (carry) duty_reg <= duty;
  end

  // N-bit equality comparator.
  assign equal = (count == duty_reg);

  assign set_in   = MATCH_SETS ? equal    : overflow;
  assign reset_in = MATCH_SETS ? overflow : equal;

  // RS latch.
  always_ff @(posedge clk) begin
    if (rst) pwm <= 1'b0;
    else     pwm <= rs_next(pwm, set_in, reset_in);
  end

  assign period_start = overflow;

endmodule
