// dfc_pkg: constants and types shared by the digital feedback control (DFC)
// of the gate drivers of parallel connected IGBTs.
//
// The system runs on one clock of 100 MHz, so one clock period is the 10 ns
// unit step of the gate delay. The ADC words are 8 bits wide and the
// controller serves two IGBTs; both numbers follow the document. The gate
// pattern codes assume a gate driver board whose DAC/op-amp chain gives
// 300 mV per code step starting from 0 V (the step follows the document, the
// zero point and the +15 V / 0 V gate levels are this design's choice).
package dfc_pkg;

  localparam int unsigned N_CH     = 2;   // parallel IGBTs
  localparam int unsigned DATA_W   = 8;   // ADC resolution
  localparam int unsigned CNT_W    = 5;   // delay counter width: 0..31 steps of 10 ns
  localparam int unsigned MED_WIN  = 5;   // median filter window

  localparam logic [7:0] GATE_ON_CODE  = 8'd50;  // 50 * 0.3 V = +15 V
  localparam logic [7:0] GATE_OFF_CODE = 8'd0;   // 0 V

  typedef logic [DATA_W-1:0] sample_t;

  // PWM phase: the peak of the turn-on transient is searched while the PWM
  // command is high, the turn-off one while it is low.
  typedef enum logic {
    PH_ON  = 1'b0,
    PH_OFF = 1'b1
  } phase_e;

endpackage
