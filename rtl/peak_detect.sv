// peak_detect: peak tracking of one filtered IGBT current.
//
// The logic keeps the last two samples. The middle sample x1 of the three
// newest samples (x2, x1, din) is a peak candidate when it is at least as
// large as both neighbours (a local maximum or a point of a plateau) and not
// below MIN_LEVEL. A candidate is written to the peak RAM only if it exceeds
// the value already stored for the running PWM phase, so a local extremum that
// is smaller than an earlier peak cannot replace it. The RAM entry is cleared
// by the phase logic at the start of each phase. The comparison with the
// stored peak follows the document; the three-sample test and MIN_LEVEL are
// this design's reading of its "additional mathematical constraints".
//
// Interface: din/din_valid from the median filter; stored is the RAM value of
// the current phase (port A read); we/wdata write it back.
// Timing: a peak at sample k is written when sample k+1 arrives.
module peak_detect
  import dfc_pkg::*;
#(
  parameter int unsigned W         = DATA_W,
  parameter logic [W-1:0] MIN_LEVEL = W'(4)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         din_valid,
  input  logic [W-1:0] stored,
  output logic         we,
  output logic [W-1:0] wdata
);

  logic [W-1:0] x1, x2;
  logic         candidate;

  assign candidate = din_valid && (x1 >= x2) && (x1 >= din) && (x1 >= MIN_LEVEL);
  assign we        = candidate && (x1 > stored);
  assign wdata     = x1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
    end else if (din_valid) begin
      x1 <= din;
      x2 <= x1;
    end
  end

endmodule
