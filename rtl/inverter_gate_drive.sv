// inverter_gate_drive: gate signals for the four switches of a single phase
// full bridge inverter.
//
// The PWM signal is ANDed with a rectangular pulse wave to drive S1 and S3
// (one diagonal of the bridge) and with the inverted pulse wave to drive S2
// and S4 (the other diagonal). While the pulse wave is high the load sees
// +Vdc during PWM pulses, while it is low it sees -Vdc, so the PWM duty
// sets the RMS output voltage and the pulse wave sets the output frequency.
// Since S1/S2 and S4/S3 share a bridge leg, the two diagonals are never on
// together; an assertion checks this.
//
// Interface: `pwm` from a PWM generator, `tick` its period_start; `gates`
// and `pulse` are outputs. The gates are combinational from two flip-flops
// (the PWM latch and the pulse wave), with no dead time added.
//
// The AND/inverter structure is the document's. The pulse wave generator is
// instantiated here (pulse_wave_gen); its timing is this design's choice.
module inverter_gate_drive
  import pwm_pkg::*;
#(
  parameter int unsigned HALF_PERIODS = HALF_PERIODS_DEFAULT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  pwm,
  input  logic  tick,
  output logic  pulse,
  output gate_t gates
);

  pulse_wave_gen #(.HALF_PERIODS(HALF_PERIODS)) u_pulse (
    .clk   (clk),
    .rst   (rst),
    .tick  (tick),
    .pulse (pulse)
  );

  always_comb begin
    gates.s1 = pwm &  pulse;
    gates.s3 = pwm &  pulse;
    gates.s2 = pwm & ~pulse;
    gates.s4 = pwm & ~pulse;
  end

  // No shoot-through: the switches of one leg are never on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst)
    !(gates.s1 && gates.s2) && !(gates.s4 && gates.s3));

endmodule
