// overcurrent_protect: real-time overcurrent monitor for N IGBT currents.
//
// Every filtered current sample is compared with OC_LIMIT. A sample above
// the limit sets the latched trip flag (and the flag of that channel); while
// trip is set the top level forces all gate patterns to the off level. The
// trip is released by clear, but only in a cycle in which no channel is above
// the limit. The document states that the peak monitoring can protect against
// overcurrent from overload, short circuit or unbalance within a few us to
// hundreds of ns; the latch, the clear input and the default limit (240 of
// 255 codes) are this design's choices.
//
// Timing: trip rises one cycle after the offending sample is valid, i.e. a
// few tens of ns after the ADC word, well inside the required response time.
module overcurrent_protect
  import dfc_pkg::*;
#(
  parameter int unsigned N        = N_CH,
  parameter int unsigned W        = DATA_W,
  parameter int unsigned OC_LIMIT = 240
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] sample [N],
  input  logic         sample_valid,
  input  logic         clear,
  output logic         trip,
  output logic [N-1:0] trip_ch
);

  logic [N-1:0] over;

  always_comb begin
    for (int i = 0; i < int'(N); i++)
      over[i] = sample_valid && (sample[i] > W'(OC_LIMIT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trip    <= 1'b0;
      trip_ch <= '0;
    end else if (|over) begin
      trip    <= 1'b1;
      trip_ch <= trip_ch | over;
    end else if (clear) begin
      trip    <= 1'b0;
      trip_ch <= '0;
    end
  end

endmodule
