// pwm_inverter_top: the three digital PWM generators side by side, with the
// counter based generator driving the gate logic of a full bridge inverter.
//
// Each generator has its own duty input and PWM output:
//   hf_*  high frequency counter based generator (8-bit, period 256 clocks)
//   cb_*  counter based (down counter) generator (4-bit, period 16 clocks)
//   cc_*  cascaded counter based generator (2 x 4-bit, period 256 clocks)
// The counter based generator feeds inverter_gate_drive, which ANDs its PWM
// output with a rectangular pulse wave to produce the gate signals of S1..S4.
// The power bridge, the analog-to-digital converter and the controller that
// would choose the duty words lie outside the chip; their signals are the
// ports of this module.
//
// Clock: one clock for everything (50 MHz on the original board, giving
// 195.3 kHz, 3.125 MHz and 195.3 kHz PWM). Reset: synchronous, active high;
// it stops all three generators with their outputs low.
//
// Choosing the counter based generator for the inverter follows the general
// block diagram of the digital control scheme; showing all three generators
// in one top is this design's arrangement.
module pwm_inverter_top
  import pwm_pkg::*;
#(
  parameter int unsigned HF_WIDTH       = HF_WIDTH_DEFAULT,
  parameter bit          HF_MATCH_SETS  = 1'b1,
  parameter int unsigned CB_WIDTH       = CB_WIDTH_DEFAULT,
  parameter int unsigned CC_DIGIT_WIDTH = CC_DIGIT_WIDTH_DEFAULT,
  parameter int unsigned HALF_PERIODS   = HALF_PERIODS_DEFAULT
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [HF_WIDTH-1:0]       hf_duty,
  input  logic [CB_WIDTH-1:0]       cb_duty,
  input  logic [2*CC_DIGIT_WIDTH-1:0] cc_duty,
  output logic                      hf_pwm,
  output logic                      hf_period_start,
  output logic                      cb_pwm,
  output logic                      cb_period_start,
  output logic                      cc_pwm,
  output logic                      cc_period_start,
  output logic                      pulse,
  output gate_t                     gates
);

  hf_pwm_gen #(.WIDTH(HF_WIDTH), .MATCH_SETS(HF_MATCH_SETS)) u_hf (
    .clk          (clk),
    .rst          (rst),
    .duty         (hf_duty),
    .pwm          (hf_pwm),
    .period_start (hf_period_start)
  );

  counter_pwm_gen #(.WIDTH(CB_WIDTH)) u_cb (
    .clk          (clk),
    .rst          (rst),
    .duty         (cb_duty),
    .pwm          (cb_pwm),
    .period_start (cb_period_start)
  );

  cascaded_pwm_gen #(.DIGIT_WIDTH(CC_DIGIT_WIDTH)) u_cc (
    .clk          (clk),
    .rst          (rst),
    .duty         (cc_duty),
    .pwm          (cc_pwm),
    .period_start (cc_period_start)
  );

  inverter_gate_drive #(.HALF_PERIODS(HALF_PERIODS)) u_gates (
    .clk   (clk),
    .rst   (rst),
    .pwm   (cb_pwm),
    .tick  (cb_period_start),
    .pulse (pulse),
    .gates (gates)
  );

endmodule
