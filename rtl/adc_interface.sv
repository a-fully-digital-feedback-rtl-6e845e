// adc_interface: sampling clock and data capture for N parallel 8-bit ADCs.
//
// The ADCs get a sampling clock of half the system clock (50 MHz from the
// 100 MHz FPGA clock, as in the document) through adc_clk, a toggling
// flip-flop. The ADC data buses are registered twice in the system clock
// domain; the word is taken in the system cycle in which adc_clk is low,
// i.e. half an ADC period after the rising edge that launched it, so it is
// stable. sample_valid pulses for one system cycle per ADC sample (every
// second cycle) and is the clock enable of the filters downstream.
// The capture point and the two-register input stage are this design's own.
//
// Timing: a word present on adc_data is on sample[] 2 to 3 cycles later.
module adc_interface
  import dfc_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    adc_clk,
  input  sample_t adc_data [N],
  output sample_t sample   [N],
  output logic    sample_valid
);

  sample_t din_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_clk      <= 1'b0;
      sample_valid <= 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        din_q[i]  <= '0;
        sample[i] <= '0;
      end
    end else begin
      adc_clk      <= ~adc_clk;
      sample_valid <= ~adc_clk;          // take the word while adc_clk is low
      for (int i = 0; i < int'(N); i++) begin
        din_q[i] <= adc_data[i];
        if (!adc_clk) sample[i] <= din_q[i];
      end
    end
  end

endmodule
