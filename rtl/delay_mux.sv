// delay_mux: delay selection multiplexer of one IGBT gate signal.
//
// The PWM command runs through a shift register of 2**W taps clocked at
// 100 MHz, so tap k is the command delayed by k+1 cycles, k*10 ns beyond the
// first register. The turn-on edge of the gate is taken from tap sel_on: the
// IGBT with the largest turn-on peak gets its turn-on delayed by one 10 ns
// unit per counter step, as in the document. The turn-off edge is taken from
// tap OFF_BASE - sel_off: each counter step makes the turn-off one unit
// earlier than the nominal OFF_BASE delay (the document's Fig. 1 shows the
// falling edge of the IGBT with the turn-off peak moved earlier). Advancing an
// edge needs the nominal delay OFF_BASE on all turn-off edges; that offset is
// this design's choice.
//
// The gate output is set by a rising edge of the turn-on tap and cleared by a
// falling edge of the turn-off tap. The selects may change at any time: the
// taps hold a single moving edge, so moving a select by one tap creates no
// false edge as long as the PWM on and off times are longer than the line.
//
// Timing: gate rises sel_on+1 clock edges after the edge that samples pwm
// high, and falls OFF_BASE-sel_off+1 edges after the edge that samples it low.
module delay_mux
  import dfc_pkg::*;
#(
  parameter int unsigned W        = CNT_W,
  parameter int unsigned OFF_BASE = 2**W - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pwm,
  input  logic [W-1:0] sel_on,
  input  logic [W-1:0] sel_off,
  output logic         gate
);

  localparam int unsigned TAPS = 2**W;

  logic [TAPS-1:0] line;
  logic            on_tap, off_tap, on_tap_q, off_tap_q;
  logic [W-1:0]    off_idx;

  assign off_idx = W'(OFF_BASE) - sel_off;
  assign on_tap  = line[sel_on];
  assign off_tap = line[off_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line      <= '0;
      on_tap_q  <= 1'b0;
      off_tap_q <= 1'b0;
      gate      <= 1'b0;
    end else begin
      line      <= {line[TAPS-2:0], pwm};
      on_tap_q  <= on_tap;
      off_tap_q <= off_tap;
      if (on_tap && !on_tap_q)        gate <= 1'b1;
      else if (!off_tap && off_tap_q) gate <= 1'b0;
    end
  end

  initial assert (OFF_BASE < TAPS) else $error("delay_mux: OFF_BASE beyond the line");

endmodule
