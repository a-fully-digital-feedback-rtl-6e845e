// tb_median_filter: self-checking test of the 5-sample median filter.
// Feeds random samples (with gaps in din_valid) and isolated noise spikes,
// compares every output with a sorted copy of the reference window (and a
// second filter with the 3-sample window against a 3-way median), checks
// the one-cycle latency and that a single-sample spike never reaches dout.
module tb_median_filter;
  localparam int WIN = 5;
  logic clk = 0, rst_n = 0;
  logic [7:0] din = 0;
  logic din_valid = 0;
  logic [7:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  logic [7:0] ref_win [WIN];

  median_filter #(.WIN(WIN), .W(8)) dut (.*);

  // the 3-sample window, the other size the filter is built for
  logic [7:0] dout3;
  logic dout3_valid;
  logic [7:0] ref3 [3];
  median_filter #(.WIN(3), .W(8)) dut3 (.clk, .rst_n, .din, .din_valid, .dout(dout3), .dout_valid(dout3_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_median();
    logic [7:0] s [WIN];
    logic [7:0] t;
    s = ref_win;
    for (int i = 0; i < WIN; i++)
      for (int j = 0; j < WIN - 1 - i; j++)
        if (s[j] > s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
    return s[WIN/2];
  endfunction

  task automatic push(input logic [7:0] v);
    logic [7:0] exp, exp3;
    for (int i = WIN - 1; i > 0; i--) ref_win[i] = ref_win[i-1];
    ref_win[0] = v;
    exp = ref_median();
    ref3[2] = ref3[1]; ref3[1] = ref3[0]; ref3[0] = v;
    exp3 = (ref3[0] > ref3[1]) ? ((ref3[1] > ref3[2]) ? ref3[1] : ((ref3[0] > ref3[2]) ? ref3[2] : ref3[0]))
                               : ((ref3[0] > ref3[2]) ? ref3[0] : ((ref3[1] > ref3[2]) ? ref3[2] : ref3[1]));
    din <= v; din_valid <= 1;
    @(posedge clk);
    din_valid <= 0;
    #1;
    checks++;
    if (!dout_valid || dout !== exp) begin
      failures++;
      $display("mismatch: in=%0d got %0d (valid %b) exp %0d", v, dout, dout_valid, exp);
    end
    checks++;
    if (!dout3_valid || dout3 !== exp3) begin
      failures++;
      $display("WIN=3 mismatch: in=%0d got %0d exp %0d", v, dout3, exp3);
    end
    if ($urandom_range(0, 1) != 0) begin
      @(posedge clk); #1;
      checks++;
      if (dout_valid) begin failures++; $display("dout_valid without input"); end
    end
  endtask

  initial begin
    logic [7:0] level;
    for (int i = 0; i < WIN; i++) ref_win[i] = 0;
    for (int i = 0; i < 3; i++) ref3[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // random data
    for (int n = 0; n < 2000; n++) push(8'($urandom_range(0, 255)));
    // a smooth level with single-sample spikes: the spike must vanish
    level = 8'd20;
    for (int n = 0; n < 300; n++) begin
      if (n % 17 == 8) push(8'd230);
      else push(level);
      #0;
      checks++;
      if (n >= WIN && dout > 8'd40) begin failures++; $display("spike passed: %0d", dout); end
      if (n % 50 == 49) level = level + 8'd3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
