// peak_ram: small memory holding the peak amplitude of each PWM phase of one
// IGBT current (entry PH_ON: turn-on phase, entry PH_OFF: turn-off phase).
//
// Port A (read and write) serves the peak detection logic, which compares
// each new peak with the stored one and writes the larger. Port B (read only)
// serves the max-min peak selection, which reads the entry of the phase that
// has just ended. clr writes zero to entry clr_addr, as the document resets the
// stored value at each new on/off sequence of the PWM signal; clr wins over a
// write to the same entry in the same cycle. The document shows one RAM per
// IGBT; the two-entry organisation and two ports are this design's choice.
//
// Timing: writes take effect at the clock edge, reads are combinational.
module peak_ram
  import dfc_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic [$clog2(DEPTH)-1:0] clr_addr,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [W-1:0]             wdata_a,
  output logic [W-1:0]             rdata_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  output logic [W-1:0]             rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (we && !(clr && clr_addr == addr_a)) mem[addr_a] <= wdata_a;
      if (clr) mem[clr_addr] <= '0;
    end
  end

  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];

endmodule
