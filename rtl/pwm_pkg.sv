// pwm_pkg: types, default sizes and the set/reset rule shared by the PWM
// generators and the inverter gate logic.
//
// Every generator ends in an RS latch. In this RTL the latch is a clocked
// flip-flop updated with rs_next(): reset wins over set when both arrive in
// the same cycle, which makes a duty word of zero give a constant low output.
// The document does not say which input wins; reset priority is this
// design's choice.
//
// The default widths are the document's: an 8-bit high frequency counter
// generator, a 4-bit down-counter generator and two cascaded 4-bit counters.
// The inverter half-cycle length (HALF_PERIODS_DEFAULT) is not given in the
// document; 31250 PWM periods of the 4-bit generator at 50 MHz give a 50 Hz
// output.
package pwm_pkg;

  localparam int unsigned HF_WIDTH_DEFAULT     = 8;
  localparam int unsigned CB_WIDTH_DEFAULT     = 4;
  localparam int unsigned CC_DIGIT_WIDTH_DEFAULT = 4;
  localparam int unsigned HALF_PERIODS_DEFAULT = 31250;

  // Gate drive of the four switches of the full bridge. s1/s3 form one
  // diagonal, s2/s4 the other.
  typedef struct packed {
    logic s1;
    logic s2;
    logic s3;
    logic s4;
  } gate_t;

  // Next state of a reset-dominant RS latch.
  function automatic logic rs_next(input logic q, input logic s, input logic r);
    if (r)      return 1'b0;
    else if (s) return 1'b1;
    else        return q;
  endfunction

endpackage
