// pulse_wave_gen: rectangular (square) wave that sets the polarity of the
// inverter output.
//
// The wave is built from the PWM period: `tick` is high once per PWM period
// (the generator's period_start) and the output toggles after every
// HALF_PERIODS ticks, so each half cycle of the inverter output carries
// HALF_PERIODS PWM pulses and the output frequency is
// f_pwm / (2 * HALF_PERIODS).
//
// Timing: `pulse` changes at the clock edge that ends a tick cycle, i.e. in
// the second cycle of a PWM period, when the PWM output of the counter based
// generator is low, so no PWM pulse is split between the two halves.
// Reset (synchronous, active high) clears the tick count and the output.
//
// The document only names a pulse wave generator feeding the gate logic; how
// it is timed (here: locked to the PWM period) and its default half-cycle
// length (31250 periods, 50 Hz from a 3.125 MHz PWM) are this design's
// choices.
module pulse_wave_gen
  import pwm_pkg::*;
#(
  parameter int unsigned HALF_PERIODS = HALF_PERIODS_DEFAULT
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  output logic pulse
);

  localparam int unsigned CW = (HALF_PERIODS > 1) ? $clog2(HALF_PERIODS) : 1;
  localparam logic [CW-1:0] LAST = CW'(HALF_PERIODS - 1);

  logic [CW-1:0] tick_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      tick_count <= '0;
      pulse      <= 1'b0;
    end else if (tick) begin
      if (tick_count == LAST) begin
        tick_count <= '0;
        pulse      <= ~pulse;
      end else begin
        tick_count <= tick_count + 1'b1;
      end
    end
  end

endmodule
