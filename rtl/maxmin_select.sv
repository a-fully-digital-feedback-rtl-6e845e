// maxmin_select: max-min peak selection over the N IGBT peak values.
//
// Combinational. It returns the largest and the smallest peak and the index
// of the IGBT that holds each. On equal values the lower index wins. The
// document gives the function (select the devices with maximum and minimum
// peak current); the linear scan is this design's choice.
module maxmin_select
  import dfc_pkg::*;
#(
  parameter int unsigned N = N_CH,
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0]           peak    [N],
  output logic [W-1:0]           max_val,
  output logic [$clog2(N)-1:0]   max_idx,
  output logic [W-1:0]           min_val,
  output logic [$clog2(N)-1:0]   min_idx
);

  always_comb begin
    max_val = peak[0];
    min_val = peak[0];
    max_idx = '0;
    min_idx = '0;
    for (int i = 1; i < int'(N); i++) begin
      if (peak[i] > max_val) begin
        max_val = peak[i];
        max_idx = $clog2(N)'(i);
      end
      if (peak[i] < min_val) begin
        min_val = peak[i];
        min_idx = $clog2(N)'(i);
      end
    end
  end

endmodule
