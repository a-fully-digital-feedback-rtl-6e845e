// tb_dfc_top: end-to-end test of the digital feedback control at its default
// parameters, closed around a behavioural model of two parallel IGBTs and
// their ADCs.
//
// Phase 1: IGBT 1 turns on 52 cycles (520 ns) after IGBT 0 and turns off 10
// cycles after it, so IGBT 0 overshoots at turn-on and IGBT 1 at turn-off.
// With a load of 210 codes and slope 4 codes/cycle the model gives the
// turn-on peak of IGBT 0 as min(210, 4*dt); the controller must delay IGBT 0's
// turn-on until that peak is within the 4-code spread tolerance of IGBT 1's
// 105: 25 steps (250 ns, dt = 27), and advance IGBT 1's turn-off until its
// peak 105+4*dt is within it too (9 steps).
// Phase 2: a static share skew of 10 codes, which delays cannot remove; the
// controller must hold (balancing factor inside its band) instead of
// stepping without end. Noise spikes are injected on channel 0 throughout;
// the filtered current must never show them. Phase 3: an overcurrent on
// channel 1 must force both gate patterns off quickly, and oc_clear releases.
// Every period the gate edge spacing is checked against the delay counts.
// Each mechanism (turn-on step, turn-off step, hold, spike removal,
// overcurrent trip) is counted and must occur.
module tb_dfc_top;
  import dfc_pkg::*;

  localparam int T_ON = 400, T_OFF = 400;   // PWM on/off time, cycles

  logic clk = 0, rst_n = 0, pwm_in = 0, oc_clear = 0;
  logic adc_clk;
  sample_t adc_data [2];
  logic [7:0] gate_pattern [2];
  logic oc_trip;
  logic [1:0] oc_trip_ch;
  logic [4:0] delay_on [2], delay_off [2];
  logic [1:0] step_on, step_off;
  logic hold_on, hold_off;
  logic signed [8:0] bf_on, bf_off;

  int d_on [2], d_off [2], skew = 0, cur [2];
  logic spike_req = 0;
  logic [1:0] short_ch = 0;

  int checks = 0, failures = 0, cyc = 0;
  int n_step_on = 0, n_step_off = 0, n_hold = 0, n_spike = 0, n_trip = 0;
  int rise_t [2], fall_t [2];
  logic [7:0] gp_q [2];
  int max_filt = 0;

  dfc_top dut (.*);

  igbt_pair_model #(.I_L(210)) plant (
    .clk, .gate_pattern, .adc_clk, .adc_data, .d_on, .d_off, .skew,
    .spike_req, .short_ch, .cur
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (cycle %0d): %s", cyc, what); end
  endtask

  // monitors
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_step_on  += $countones(step_on);
      n_step_off += $countones(step_off);
      if (hold_on || hold_off) n_hold++;
      for (int k = 0; k < 2; k++) begin
        if (gate_pattern[k] != gp_q[k]) begin
          if (gate_pattern[k] == GATE_ON_CODE) rise_t[k] = cyc; else fall_t[k] = cyc;
        end
        gp_q[k] = gate_pattern[k];
        if (gate_pattern[k] != GATE_ON_CODE && gate_pattern[k] != GATE_OFF_CODE) begin
          failures++; checks++; $display("illegal gate pattern %0d", gate_pattern[k]);
        end
      end
      if (!short_ch[0] && int'(dut.filt[0]) > max_filt) max_filt = int'(dut.filt[0]);
    end
  end

  task automatic pwm_period(input bit spike);
    int d_exp_on, d_exp_off;
    pwm_in = 1;
    d_exp_on  = int'(delay_on[0]) - int'(delay_on[1]);
    repeat (T_ON) @(negedge clk);
    pwm_in = 0;
    d_exp_off = int'(delay_off[0]) - int'(delay_off[1]);   // IGBT 1 falls earlier by its advance
    check(rise_t[0] - rise_t[1] == d_exp_on, $sformatf("turn-on spacing %0d exp %0d", rise_t[0] - rise_t[1], d_exp_on));
    repeat (T_OFF / 2) @(negedge clk);
    if (spike) begin
      spike_req = 1; repeat (2) @(negedge clk); spike_req = 0;
      n_spike++;
      repeat (T_OFF / 2 - 2) @(negedge clk);
    end else repeat (T_OFF / 2) @(negedge clk);
    check(fall_t[1] - fall_t[0] == d_exp_off, $sformatf("turn-off spacing %0d exp %0d", fall_t[1] - fall_t[0], d_exp_off));
  endtask

  initial begin
    int pk [2];
    d_on[0] = 5;  d_on[1] = 57;
    d_off[0] = 10; d_off[1] = 20;
    gp_q[0] = 0; gp_q[1] = 0;
    rise_t[0] = 0; rise_t[1] = 0; fall_t[0] = 0; fall_t[1] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);

    // Phase 1: dynamic unbalance, 40 PWM periods
    for (int p = 0; p < 40; p++) pwm_period(p % 3 == 1);
    check(delay_on[0] == 5'd25 && delay_on[1] == 5'd0,
          $sformatf("turn-on delays %0d/%0d, exp 25/0", delay_on[0], delay_on[1]));
    check(delay_off[0] == 5'd0 && delay_off[1] == 5'd9,
          $sformatf("turn-off advances %0d/%0d, exp 0/9", delay_off[0], delay_off[1]));
    // the peaks of the last period are balanced within the tolerance
    pk[0] = 0; pk[1] = 0;
    pwm_in = 1;
    repeat (T_ON) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) if (cur[k] > pk[k]) pk[k] = cur[k];
    end
    pwm_in = 0;
    repeat (T_OFF) @(negedge clk);
    check(pk[0] - pk[1] <= 4 && pk[1] - pk[0] <= 4, $sformatf("turn-on peaks %0d/%0d not balanced", pk[0], pk[1]));
    $display("phase 1: delays on %0d/%0d off %0d/%0d, turn-on peaks %0d/%0d",
             delay_on[0], delay_on[1], delay_off[0], delay_off[1], pk[0], pk[1]);

    // Phase 2: static skew that no delay can remove
    skew = 10;
    for (int p = 0; p < 12; p++) pwm_period(p % 4 == 2);
    check(delay_on[0] <= 5'd26 && delay_off[0] <= 5'd3,
          $sformatf("delays ran away under static skew: on %0d off %0d", delay_on[0], delay_off[0]));
    check(n_hold > 0, "tolerance band never held a step");
    check(max_filt < 220, $sformatf("noise spike passed the median filter (%0d)", max_filt));

    // Phase 3: overcurrent
    pwm_in = 1;
    repeat (T_ON / 2) @(negedge clk);
    check(gate_pattern[0] == GATE_ON_CODE && gate_pattern[1] == GATE_ON_CODE, "gates not on before the fault");
    short_ch = 2'b10;
    begin
      int t0;
      t0 = cyc;
      while (!(gate_pattern[0] == GATE_OFF_CODE && gate_pattern[1] == GATE_OFF_CODE) && cyc - t0 < 100) @(negedge clk);
      // ADC pipeline (4 samples), capture, filter: well below 1 us
      check(cyc - t0 < 30, $sformatf("overcurrent response %0d cycles", cyc - t0));
      $display("overcurrent: gates off %0d cycles (%0d ns) after the fault", cyc - t0, 10 * (cyc - t0));
    end
    check(oc_trip && oc_trip_ch[1], "oc_trip not set");
    if (oc_trip) n_trip++;
    short_ch = 0;
    repeat (40) @(negedge clk);
    check(oc_trip && gate_pattern[0] == GATE_OFF_CODE, "trip did not latch");
    oc_clear = 1; @(negedge clk); oc_clear = 0;
    repeat (10) @(negedge clk);
    check(!oc_trip && gate_pattern[0] == GATE_ON_CODE, "oc_clear did not release the gates");
    pwm_in = 0;
    repeat (T_OFF) @(negedge clk);

    $display("mechanisms: turn-on steps %0d, turn-off steps %0d, holds %0d, spikes %0d, trips %0d",
             n_step_on, n_step_off, n_hold, n_spike, n_trip);
    check(n_step_on > 0, "no turn-on delay step");
    check(n_step_off > 0, "no turn-off delay step");
    check(n_spike > 0, "no noise spike injected");
    check(n_trip > 0, "no overcurrent trip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
