// median_filter: sliding-window median of a sample stream.
//
// The window holds the last WIN samples (WIN odd; 5 by default, as adopted in
// the document, which also tried 3). On every input sample the window shifts
// and the median of the new window is registered on dout. The median is found
// by ranking: each window element counts how many others sort below it (equal
// values are ordered by position), and the element with rank WIN/2 is the
// median. This removes isolated noise peaks narrower than WIN/2+1 samples
// while keeping the edges of the current waveform. The ranking structure is
// this design's choice; the document gives only the function.
//
// Interface: din/din_valid in, dout/dout_valid out, one output per input.
// Timing: dout_valid follows din_valid by one cycle; the window starts at zero
// after reset, so the first WIN/2 outputs see those zeros.
module median_filter
  import dfc_pkg::*;
#(
  parameter int unsigned WIN = MED_WIN,
  parameter int unsigned W   = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         din_valid,
  output logic [W-1:0] dout,
  output logic         dout_valid
);

  localparam int unsigned MID = WIN / 2;

  logic [W-1:0] win_q [WIN];   // win_q[0] is the newest sample
  logic [W-1:0] win_n [WIN];   // window after the shift
  logic [W-1:0] med;

  always_comb begin
    win_n[0] = din;
    for (int i = 1; i < int'(WIN); i++) win_n[i] = win_q[i-1];
  end

  always_comb begin
    int unsigned rank;
    med = win_n[0];
    for (int i = 0; i < int'(WIN); i++) begin
      rank = 0;
      for (int j = 0; j < int'(WIN); j++) begin
        if (j != i) begin
          if ((win_n[j] < win_n[i]) || ((win_n[j] == win_n[i]) && (j < i)))
            rank++;
        end
      end
      if (rank == MID) med = win_n[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WIN); i++) win_q[i] <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= din_valid;
      if (din_valid) begin
        win_q <= win_n;
        dout  <= med;
      end
    end
  end

  initial assert (WIN % 2 == 1) else $error("median_filter: WIN must be odd");

endmodule
