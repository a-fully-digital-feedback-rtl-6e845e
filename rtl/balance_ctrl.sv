// balance_ctrl: balancing factor and delay decision for one gate edge
// (turn-on or turn-off) of N parallel IGBTs.
//
// At the end of each PWM phase (eval) the logic receives the largest peak
// Imax(t), the IGBT that had it, and the smallest peak. It forms the
// balancing factor of the document, BF = Imax(t) - Imax(t-1), against the
// Imax of the previous evaluation, and then stores Imax(t). A trigger for the
// delay counter of the IGBT with the maximum peak is issued when both
//   |BF| > TOL_BF                     (outside the tolerance band), and
//   Imax(t) - Imin(t) > TOL_SPREAD    (max-min criterion: still unbalanced).
// While the delay steps reduce the overshoot, Imax falls from one PWM period
// to the next and the steps continue; once the peak no longer moves by more
// than the tolerance, or the peaks are equal within TOL_SPREAD, the delay is
// held. The document defines BF, the tolerance band and that BF and the
// max-min selection together trigger the counter; the exact rule above and
// both tolerance values are this design's choice.
//
// Timing: inc (one-hot, one cycle) and bf are registered one cycle after eval.
module balance_ctrl
  import dfc_pkg::*;
#(
  parameter int unsigned N          = N_CH,
  parameter int unsigned W          = DATA_W,
  parameter int unsigned TOL_BF     = 2,
  parameter int unsigned TOL_SPREAD = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 eval,
  input  logic [W-1:0]         max_val,
  input  logic [$clog2(N)-1:0] max_idx,
  input  logic [W-1:0]         min_val,
  output logic [N-1:0]         inc,
  output logic signed [W:0]    bf,
  output logic                 held      // evaluation that found an imbalance but no trigger
);

  logic [W-1:0]      prev_max;
  logic signed [W:0] bf_n;
  logic              outside_band, unbalanced, trigger;

  assign bf_n         = $signed({1'b0, max_val}) - $signed({1'b0, prev_max});
  assign outside_band = (bf_n > $signed((W+1)'(TOL_BF))) || (bf_n < -$signed((W+1)'(TOL_BF)));
  assign unbalanced   = (max_val - min_val) > W'(TOL_SPREAD);
  assign trigger      = outside_band && unbalanced;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_max <= '0;
      inc      <= '0;
      bf       <= '0;
      held     <= 1'b0;
    end else begin
      inc  <= '0;
      held <= 1'b0;
      if (eval) begin
        prev_max <= max_val;
        bf       <= bf_n;
        if (trigger) inc[max_idx] <= 1'b1;
        held     <= unbalanced && !outside_band;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(inc));

endmodule
