// pwm_phase: PWM sequence tracker.
//
// The PWM command is registered twice (it may come from outside the FPGA
// clock domain). The phase is PH_ON while the command is high and PH_OFF
// while it is low. start_on / start_off pulse for one cycle in the first cycle
// of each phase; they end the previous phase, whose peak is then evaluated,
// and clear the peak RAM entry of the new phase. The document asks that the
// data be acquired per PWM on/off sequence and the stored peaks be reset at
// the next sequence; the synchroniser and pulse form are this design's own.
//
// Timing: phase follows pwm by two cycles; the pulses coincide with the
// first cycle of the new phase value.
module pwm_phase
  import dfc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pwm,
  output logic   pwm_sync,
  output phase_e phase,
  output logic   start_on,
  output logic   start_off
);

  logic pwm_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_m     <= 1'b0;
      pwm_sync  <= 1'b0;
      start_on  <= 1'b0;
      start_off <= 1'b0;
    end else begin
      pwm_m     <= pwm;
      pwm_sync  <= pwm_m;
      start_on  <= pwm_m && !pwm_sync;
      start_off <= !pwm_m && pwm_sync;
    end
  end

  // phase is registered together with the pulses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PH_OFF;
    else        phase <= pwm_m ? PH_ON : PH_OFF;
  end

endmodule
