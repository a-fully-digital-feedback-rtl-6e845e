// delay_counter: delay step counter of one gate edge of one IGBT.
//
// Each inc pulse from the balancing factor logic raises the count by one unit
// (one 10 ns step of the gate delay, as in the document); the count drives the
// select line of the delay multiplexer. The count saturates at its maximum
// 2**W-1 instead of wrapping, so a long run of triggers cannot jump the delay
// back to zero; saturation and the clr input are this design's own.
//
// Timing: cnt changes at the clock edge that samples inc.
module delay_counter
  import dfc_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] cnt,
  output logic         at_max
);

  assign at_max = &cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                cnt <= '0;
    else if (clr)              cnt <= '0;
    else if (inc && !at_max)   cnt <= cnt + 1'b1;
  end

endmodule
