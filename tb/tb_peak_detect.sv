// tb_peak_detect: self-checking test of the peak detection with a RAM word
// modelled in the testbench. Each segment is a random waveform (noise,
// overshoot shapes, plateaus) followed by two zero samples; the stored peak
// must then equal the largest sample of the segment (0 if it is below the
// minimum level 4), and no write may ever lower the stored value.
module tb_peak_detect;
  logic clk = 0, rst_n = 0;
  logic [7:0] din = 0;
  logic din_valid = 0;
  logic [7:0] stored = 0;
  logic we;
  logic [7:0] wdata;
  int checks = 0, failures = 0;

  peak_detect dut (.*);

  always #5 clk = ~clk;

  logic clr_stored = 0;

  always @(posedge clk) if (clr_stored) stored <= 0;
  else if (we) begin
    checks++;
    if (wdata <= stored) begin failures++; $display("write does not raise the peak"); end
    stored <= wdata;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input logic [7:0] v);
    @(negedge clk);
    din = v; din_valid = 1;
    @(negedge clk);
    din_valid = 0;
    if ($urandom_range(0, 1) != 0) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int seg = 0; seg < 300; seg++) begin
      int mx, len, kind;
      logic [7:0] v;
      mx = 0;
      len = $urandom_range(3, 40);
      kind = seg % 3;
      for (int k = 0; k < len; k++) begin
        case (kind)
          0: v = 8'($urandom_range(0, 255));                          // noise
          1: v = (k < len / 2) ? 8'(k * 9) : 8'((len - k) * 3 + 20);   // overshoot then settle
          default: v = (k < 3) ? 8'(k * 40) : 8'(100 + (seg % 7));    // ramp to plateau
        endcase
        if (int'(v) > mx) mx = int'(v);
        feed(v);
      end
      feed(0); feed(0);
      @(posedge clk); #1;
      checks++;
      if (int'(stored) != ((mx >= 4) ? mx : 0)) begin
        failures++;
        $display("segment %0d kind %0d: stored %0d exp %0d", seg, kind, stored, mx);
      end
      clr_stored = 1;            // the phase logic clears the entry
      @(posedge clk); #1;
      clr_stored = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
