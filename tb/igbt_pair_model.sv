// igbt_pair_model: behavioural model of the power stage and ADCs seen by the
// digital feedback control, for simulation only (not synthesizable).
//
// Two parallel IGBTs share a load current I_L (ADC codes). A gate is on when
// its 8-bit gate pattern is at least half the on code. Each IGBT follows its
// gate after its own turn-on and turn-off delay (cycles of 10 ns); unequal
// delays are the unbalance to be corrected. Each current ramps toward its
// share at SLOPE codes per cycle: the whole load while it conducts alone,
// I_L/2 +/- skew when both conduct, 0 when off. A current above its target
// first holds for HOLD cycles (the overshoot top, long enough to pass the
// 5-sample median filter: at least 3 samples), then falls at SLOPE per
// cycle. So the IGBT that turns on first reaches min(I_L, SLOPE*dt) where dt
// is the turn-on mismatch, and the one that turns off last rises by
// SLOPE*dt above its share.
// The ADC model samples both currents on each rising edge of adc_clk and
// outputs them ADC_LAT sampling periods later. spike_req, held for one sampling period, adds one sample of
// value SPIKE (noise at the current zero crossing); short_ch forces a current
// of SHORT_I on one channel (overcurrent).
module igbt_pair_model #(
  parameter int I_L     = 200,
  parameter int SLOPE   = 4,
  parameter int HOLD    = 8,
  parameter int ADC_LAT = 4,
  parameter int SPIKE   = 230,
  parameter int SHORT_I = 250
) (
  input  logic       clk,
  input  logic [7:0] gate_pattern [2],
  input  logic       adc_clk,
  output logic [7:0] adc_data [2],
  input  int         d_on  [2],     // device turn-on delays, cycles (< 64)
  input  int         d_off [2],     // device turn-off delays, cycles (< 64)
  input  int         skew,          // static share offset of IGBT 0
  input  logic       spike_req,     // noise sample on channel 0 while high
  input  logic [1:0] short_ch,      // force an overcurrent
  output int         cur [2]        // modelled currents
);

  logic [63:0] hist [2];
  logic        on [2];
  int          held [2];
  logic [7:0]  pipe [2][ADC_LAT];

  initial begin
    for (int k = 0; k < 2; k++) begin
      hist[k] = '0; on[k] = 0; cur[k] = 0; held[k] = 0;
      for (int j = 0; j < ADC_LAT; j++) pipe[k][j] = 0;
      adc_data[k] = 0;
    end
  end

  always @(posedge clk) begin
    int n_on, tgt;
    for (int k = 0; k < 2; k++) begin
      hist[k] = {hist[k][62:0], gate_pattern[k] >= 8'd25};
      if (!on[k] && hist[k][d_on[k]] && !hist[k][d_on[k]+1])      on[k] = 1;  // delayed turn-on edge
      else if (on[k] && !hist[k][d_off[k]] && hist[k][d_off[k]+1]) on[k] = 0;  // delayed turn-off edge
    end
    n_on = int'(on[0]) + int'(on[1]);
    for (int k = 0; k < 2; k++) begin
      if (!on[k])        tgt = 0;
      else if (n_on == 1) tgt = I_L;
      else               tgt = I_L / 2 + ((k == 0) ? skew : -skew);
      if (cur[k] < tgt) begin
        cur[k] = (cur[k] + SLOPE > tgt) ? tgt : cur[k] + SLOPE;
        held[k] = 0;
      end else if (cur[k] > tgt) begin
        if (held[k] < HOLD) held[k]++;
        else cur[k] = (cur[k] - SLOPE < tgt) ? tgt : cur[k] - SLOPE;
      end else held[k] = 0;
    end
  end

  always @(posedge adc_clk) begin
    for (int k = 0; k < 2; k++) begin
      for (int j = ADC_LAT - 1; j > 0; j--) pipe[k][j] = pipe[k][j-1];
      if (short_ch[k])                        pipe[k][0] = 8'(SHORT_I);
      else if (k == 0 && spike_req)       pipe[k][0] = 8'(SPIKE);
      else                                    pipe[k][0] = 8'((cur[k] > 255) ? 255 : cur[k]);
      adc_data[k] <= pipe[k][ADC_LAT-1];
    end
  end

endmodule
