// tb_pwm_inverter_top: end-to-end testbench of pwm_inverter_top at its
// default parameters (8-bit high frequency generator, 4-bit counter based
// generator driving the inverter, 2 x 4-bit cascaded generator, 31250 PWM
// periods per inverter half cycle).
//
// It runs two complete inverter output cycles (four half cycles, about two
// million clocks), then presses reset.
// Checks, all against values computed in the testbench:
//  * every generator's period is 2**N clocks (distance between period_start
//    pulses);
//  * the high cycles in each period window (the cycles after one
//    period_start up to and including the next) equal D for the counter
//    based and cascaded generators and 2**8 - D (0 for D = 0) for the high
//    frequency generator, where D is the word that generator uses for that
//    period: the word present at the period start (counter based, cascaded)
//    or the one present a period earlier (high frequency, loaded into its
//    duty register at the period boundary);
//  * the gate signals: S1 = S3 = pwm AND pulse, S2 = S4 = pwm AND NOT pulse,
//    never both switches of one leg;
//  * per inverter half cycle, the cycles with +Vdc (or -Vdc) across the load
//    equal the sum of the duty words of the PWM periods in it, and the
//    opposite polarity never appears;
//  * while reset is held, every output is low.
// Each mechanism is counted and a failure is counted for one that never
// happened: zero and full-scale duty words on each generator, a duty register
// reload, a match on a low-counter wrap, positive and negative half cycles,
// polarity switches and a reset stop.
module tb_pwm_inverter_top;

  import pwm_pkg::*;

  localparam int HP = 1 << HF_WIDTH_DEFAULT;
  localparam int CP = 1 << CB_WIDTH_DEFAULT;
  localparam int SP = 1 << (2 * CC_DIGIT_WIDTH_DEFAULT);
  localparam int HALF = HALF_PERIODS_DEFAULT;
  localparam int HALVES = 4;

  logic clk = 1'b0;
  logic rst;
  logic [HF_WIDTH_DEFAULT-1:0] hf_duty;
  logic [CB_WIDTH_DEFAULT-1:0] cb_duty;
  logic [2*CC_DIGIT_WIDTH_DEFAULT-1:0] cc_duty;
  logic hf_pwm, hf_ps, cb_pwm, cb_ps, cc_pwm, cc_ps, pulse;
  gate_t gates;

  int checks = 0;
  int failures = 0;

  pwm_inverter_top dut (
    .clk(clk), .rst(rst),
    .hf_duty(hf_duty), .cb_duty(cb_duty), .cc_duty(cc_duty),
    .hf_pwm(hf_pwm), .hf_period_start(hf_ps),
    .cb_pwm(cb_pwm), .cb_period_start(cb_ps),
    .cc_pwm(cc_pwm), .cc_period_start(cc_ps),
    .pulse(pulse), .gates(gates));

  always #5 clk = ~clk;

  initial begin
    repeat (HALVES * HALF * CP + 20 * CP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // duty word lists (the counter based list uses the words measured on the
  // board: 1100, 0100, 1111, 0010, 1000, 0110)
  int hf_words[$] = '{64, 0, 255, 192, 1, 128, 37};
  int cc_words[$] = '{96, 0, 255, 16, 240, 1, 200};
  int cb_half_words[HALVES] = '{12, 4, 15, 0};
  int cb_words[$] = '{12, 4, 15, 2, 8, 6};

  // mechanism counters
  int n_hf_zero, n_hf_full, n_hf_reload, n_cb_zero, n_cb_full;
  int n_cc_zero, n_cc_full, n_cc_wrap_match, n_pos_half, n_neg_half, n_switch;
  int n_reset_stop;

  bit running;
  int halves_done;

  // per-generator window state
  bit hf_seen, cb_seen, cc_seen;
  int hf_gap, cb_gap, cc_gap, hf_highs, cb_highs, cc_highs;
  int hf_d, hf_d_next, cb_d, cc_d, hf_wi, cc_wi, hf_periods, cc_periods;

  // inverter state
  bit after_cb_ps, last_pulse, half_started;
  int half_pos, half_neg, half_exp, half_i;

  always @(negedge clk) begin
    if (running) begin
      // ---------------- high frequency generator
      hf_gap++;
      if (hf_pwm) hf_highs++;
      if (hf_ps) begin
        if (hf_seen) begin
          check("hf period length", hf_gap, HP);
          check("hf high cycles", hf_highs, (hf_d == 0) ? 0 : HP - hf_d);
          if (hf_d == 0) n_hf_zero++;
          if (hf_d == HP - 1) n_hf_full++;
        end
        if (hf_seen && hf_d_next != hf_d) n_hf_reload++;
        hf_seen = 1'b1; hf_gap = 0; hf_highs = 0;
        hf_d = hf_d_next;
        // new word, loaded at the end of this period
        hf_periods++;
        if (hf_periods % 3 == 0) begin
          hf_wi = (hf_wi + 1) % hf_words.size();
          hf_duty = HF_WIDTH_DEFAULT'(hf_words[hf_wi]);
        end
        hf_d_next = int'(hf_duty);
      end
      // ---------------- counter based generator
      cb_gap++;
      if (cb_pwm) cb_highs++;
      if (cb_ps) begin
        if (cb_seen) begin
          check("cb period length", cb_gap, CP);
          check("cb high cycles", cb_highs, cb_d);
          if (cb_d == 0) n_cb_zero++;
          if (cb_d == CP - 1) n_cb_full++;
        end
        cb_seen = 1'b1; cb_gap = 0; cb_highs = 0;
        cb_d = int'(cb_duty);
      end
      // ---------------- cascaded generator
      cc_gap++;
      if (cc_pwm) cc_highs++;
      if (cc_ps) begin
        if (cc_seen) begin
          check("cc period length", cc_gap, SP);
          check("cc high cycles", cc_highs, cc_d);
          if (cc_d == 0) n_cc_zero++;
          if (cc_d == SP - 1) n_cc_full++;
          if (cc_d != 0 && cc_d % 16 == 0) n_cc_wrap_match++;
        end
        cc_seen = 1'b1; cc_gap = 0; cc_highs = 0;
        cc_periods++;
        if (cc_periods % 2 == 0) begin
          cc_wi = (cc_wi + 1) % cc_words.size();
          cc_duty = 8'(cc_words[cc_wi]);
        end
        cc_d = int'(cc_duty);
      end
      // ---------------- inverter gate signals
      check("S1", int'(gates.s1), int'(cb_pwm && pulse));
      check("S3", int'(gates.s3), int'(cb_pwm && pulse));
      check("S2", int'(gates.s2), int'(cb_pwm && !pulse));
      check("S4", int'(gates.s4), int'(cb_pwm && !pulse));
      check("no shoot-through", int'((gates.s1 && gates.s2) || (gates.s4 && gates.s3)), 0);
      if (after_cb_ps) begin
        // first cycle of a PWM window: the pulse wave may have just switched
        if (pulse != last_pulse) begin
          n_switch++;
          if (half_started) begin
            check("half cycle +Vdc cycles", last_pulse ? half_pos : half_neg, half_exp);
            check("half cycle opposite polarity cycles", last_pulse ? half_neg : half_pos, 0);
            if (half_exp > 0 && last_pulse) n_pos_half++;
            if (half_exp > 0 && !last_pulse) n_neg_half++;
            halves_done++;
          end
          half_started = 1'b1;
          half_pos = 0; half_neg = 0; half_exp = 0;
          if (half_i < HALVES) begin
            half_i++;
            cb_duty = CB_WIDTH_DEFAULT'(cb_half_words[half_i % HALVES]);
          end
        end
        half_exp += cb_d;
      end
      if (gates.s1 && gates.s3) half_pos++;
      if (gates.s2 && gates.s4) half_neg++;
      last_pulse  = pulse;
      after_cb_ps = cb_ps;
    end
  end

  initial begin
    rst = 1'b1;
    running = 1'b0;
    hf_wi = 0; cc_wi = 0; half_i = 0;
    hf_duty = HF_WIDTH_DEFAULT'(hf_words[0]);
    cc_duty = 8'(cc_words[0]);
    cb_duty = CB_WIDTH_DEFAULT'(cb_half_words[0]);
    hf_seen = 0; cb_seen = 0; cc_seen = 0;
    hf_gap = 0; cb_gap = 0; cc_gap = 0; hf_highs = 0; cb_highs = 0; cc_highs = 0;
    hf_d = 0; hf_d_next = 0; cb_d = 0; cc_d = 0; hf_periods = 0; cc_periods = 0;
    after_cb_ps = 0; last_pulse = 0; half_started = 0; half_pos = 0; half_neg = 0; half_exp = 0;
    halves_done = 0;
    n_hf_zero = 0; n_hf_full = 0; n_hf_reload = 0; n_cb_zero = 0; n_cb_full = 0;
    n_cc_zero = 0; n_cc_full = 0; n_cc_wrap_match = 0; n_pos_half = 0; n_neg_half = 0;
    n_switch = 0; n_reset_stop = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    running = 1'b1;
    // the first half cycle starts with the pulse wave low: count it from the
    // start, with the word already applied
    half_started = 1'b1;
    wait (halves_done == HALVES);
    // reset stops every generator
    @(posedge clk);
    #1 rst = 1'b1;
    running = 1'b0;
    @(posedge clk);
    repeat (2 * CP) begin
      @(negedge clk);
      check("pwm low in reset", int'(hf_pwm || cb_pwm || cc_pwm), 0);
      check("gates off in reset", int'(gates.s1 || gates.s2 || gates.s3 || gates.s4), 0);
      check("pulse low in reset", int'(pulse), 0);
      if (!(hf_pwm || cb_pwm || cc_pwm || pulse)) n_reset_stop++;
    end
    $display("mechanisms: hf zero=%0d full=%0d reload=%0d | cb zero=%0d full=%0d | cc zero=%0d full=%0d wrap-match=%0d | +half=%0d -half=%0d switches=%0d | reset stops=%0d",
             n_hf_zero, n_hf_full, n_hf_reload, n_cb_zero, n_cb_full, n_cc_zero, n_cc_full,
             n_cc_wrap_match, n_pos_half, n_neg_half, n_switch, n_reset_stop);
    check("hf zero duty seen", int'(n_hf_zero > 0), 1);
    check("hf full-scale duty seen", int'(n_hf_full > 0), 1);
    check("hf duty register reload seen", int'(n_hf_reload > 0), 1);
    check("cb zero duty seen", int'(n_cb_zero > 0), 1);
    check("cb full-scale duty seen", int'(n_cb_full > 0), 1);
    check("cc zero duty seen", int'(n_cc_zero > 0), 1);
    check("cc full-scale duty seen", int'(n_cc_full > 0), 1);
    check("cc match on low-counter wrap seen", int'(n_cc_wrap_match > 0), 1);
    check("positive half cycle seen", int'(n_pos_half > 0), 1);
    check("negative half cycle seen", int'(n_neg_half > 0), 1);
    check("polarity switch seen", int'(n_switch >= HALVES), 1);
    check("reset stop seen", int'(n_reset_stop > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
