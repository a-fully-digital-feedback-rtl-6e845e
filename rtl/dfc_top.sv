// dfc_top: fully digital feedback control of the gate drivers of N parallel
// connected IGBTs (two by default), on one 100 MHz clock.
//
// Data path per IGBT current: ADC capture (50 MHz sampling clock made here) ->
// 5-sample median filter -> peak detection -> peak RAM (one entry per PWM
// phase). At the end of every PWM phase the peaks of that phase are read from
// all RAMs; the max-min peak selection finds the IGBTs with the largest and
// smallest peak, and the balancing factor logic of that edge (turn-on peaks
// are evaluated when the PWM goes low, turn-off peaks when it goes high)
// decides whether the delay counter of the IGBT with the largest peak steps
// by one unit. The counters select taps of the delay multiplexers, which
// shift the turn-on edge later, or the turn-off edge earlier, in 10 ns steps
// for the next PWM period. The gate signals leave as 8-bit digital gate
// patterns for the DAC-based gate driver board. An overcurrent monitor forces
// all patterns to the off level until oc_clear.
//
// The chain of blocks follows the document; how each phase is delimited,
// the decision rule, the turn-off offset and the pattern codes are this
// design's choices (see the module headers).
//
// Timing: a change of the delay count applies from the next edge of the same
// kind; the gate pattern follows pwm_in by 5 + delay cycles.
module dfc_top
  import dfc_pkg::*;
#(
  parameter int unsigned N          = N_CH,
  parameter int unsigned CW         = CNT_W,
  parameter int unsigned WIN        = MED_WIN,
  parameter int unsigned TOL_BF     = 2,
  parameter int unsigned TOL_SPREAD = 4,
  parameter int unsigned OC_LIMIT   = 240,
  parameter logic [7:0]  ON_CODE    = GATE_ON_CODE,   // gate pattern while on
  parameter logic [7:0]  OFF_CODE   = GATE_OFF_CODE   // gate pattern while off
) (
  input  logic          clk,          // 100 MHz system clock
  input  logic          rst_n,
  input  logic          pwm_in,       // PWM command for all parallel IGBTs
  output logic          adc_clk,      // 50 MHz sampling clock to the ADCs
  input  sample_t       adc_data  [N],
  input  logic          oc_clear,
  output logic [7:0]    gate_pattern [N],
  output logic          oc_trip,
  output logic [N-1:0]  oc_trip_ch,
  output logic [CW-1:0] delay_on  [N], // turn-on delay, in 10 ns steps
  output logic [CW-1:0] delay_off [N], // turn-off advance, in 10 ns steps
  output logic [N-1:0]  step_on,       // a turn-on delay step was taken
  output logic [N-1:0]  step_off,      // a turn-off delay step was taken
  output logic          hold_on,       // imbalance seen, BF inside the band
  output logic          hold_off,
  output logic signed [DATA_W:0] bf_on,
  output logic signed [DATA_W:0] bf_off
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic    pwm_sync, start_on, start_off;
  phase_e  phase;
  sample_t sample [N];
  logic    sample_valid;
  sample_t filt [N];
  logic    filt_valid [N];
  sample_t stored [N];
  sample_t peak_end [N];
  logic    gate [N];

  sample_t        max_val, min_val;
  logic [IW-1:0]  max_idx, min_idx;

  pwm_phase u_phase (
    .clk, .rst_n, .pwm(pwm_in), .pwm_sync, .phase, .start_on, .start_off
  );

  adc_interface #(.N(N)) u_adc (
    .clk, .rst_n, .adc_clk, .adc_data, .sample, .sample_valid
  );

  for (genvar i = 0; i < N; i++) begin : g_ch
    logic    pk_we;
    sample_t pk_wdata;

    median_filter #(.WIN(WIN), .W(DATA_W)) u_med (
      .clk, .rst_n, .din(sample[i]), .din_valid(sample_valid),
      .dout(filt[i]), .dout_valid(filt_valid[i])
    );

    peak_detect #(.W(DATA_W)) u_peak (
      .clk, .rst_n, .din(filt[i]), .din_valid(filt_valid[i]),
      .stored(stored[i]), .we(pk_we), .wdata(pk_wdata)
    );

    peak_ram #(.W(DATA_W), .DEPTH(2)) u_ram (
      .clk, .rst_n,
      .clr(start_on || start_off), .clr_addr(phase),
      .we(pk_we), .addr_a(phase), .wdata_a(pk_wdata), .rdata_a(stored[i]),
      .addr_b(~phase), .rdata_b(peak_end[i])
    );

    delay_counter #(.W(CW)) u_cnt_on (
      .clk, .rst_n, .clr(1'b0), .inc(step_on[i]), .cnt(delay_on[i]), .at_max()
    );

    delay_counter #(.W(CW)) u_cnt_off (
      .clk, .rst_n, .clr(1'b0), .inc(step_off[i]), .cnt(delay_off[i]), .at_max()
    );

    delay_mux #(.W(CW)) u_dmux (
      .clk, .rst_n, .pwm(pwm_sync), .sel_on(delay_on[i]), .sel_off(delay_off[i]),
      .gate(gate[i])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) gate_pattern[i] <= OFF_CODE;
      else        gate_pattern[i] <= (gate[i] && !oc_trip) ? ON_CODE : OFF_CODE;
    end
  end

  // Peaks of the phase that has just ended, for both edges.
  maxmin_select #(.N(N), .W(DATA_W)) u_sel (
    .peak(peak_end), .max_val, .max_idx, .min_val, .min_idx
  );

  balance_ctrl #(.N(N), .W(DATA_W), .TOL_BF(TOL_BF), .TOL_SPREAD(TOL_SPREAD)) u_bal_on (
    .clk, .rst_n, .eval(start_off), .max_val, .max_idx, .min_val,
    .inc(step_on), .bf(bf_on), .held(hold_on)
  );

  balance_ctrl #(.N(N), .W(DATA_W), .TOL_BF(TOL_BF), .TOL_SPREAD(TOL_SPREAD)) u_bal_off (
    .clk, .rst_n, .eval(start_on), .max_val, .max_idx, .min_val,
    .inc(step_off), .bf(bf_off), .held(hold_off)
  );

  overcurrent_protect #(.N(N), .W(DATA_W), .OC_LIMIT(OC_LIMIT)) u_oc (
    .clk, .rst_n, .sample(filt), .sample_valid(filt_valid[0]), .clear(oc_clear),
    .trip(oc_trip), .trip_ch(oc_trip_ch)
  );

endmodule
