// tb_overcurrent_protect: self-checking test of the overcurrent monitor:
// a valid sample above 240 trips within one cycle and latches the channel;
// clear releases the trip only when no channel is above the limit; invalid
// samples are ignored.
module tb_overcurrent_protect;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic [7:0] sample [N];
  logic sample_valid = 0, clear = 0;
  logic trip;
  logic [N-1:0] trip_ch;
  int checks = 0, failures = 0, n_trips = 0;
  bit etrip = 0;
  logic [N-1:0] ech = 0;

  overcurrent_protect dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample[0] = 0; sample[1] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      logic [N-1:0] over;
      for (int i = 0; i < N; i++)
        sample[i] = ($urandom_range(0, 30) == 0) ? 8'($urandom_range(200, 255)) : 8'($urandom_range(0, 200));
      sample_valid = 1'($urandom_range(0, 1));
      clear = ($urandom_range(0, 10) == 0);
      for (int i = 0; i < N; i++) over[i] = sample_valid && sample[i] > 240;
      @(posedge clk);
      if (|over) begin
        if (!etrip) n_trips++;
        etrip = 1; ech = ech | over;
      end else if (clear) begin
        etrip = 0; ech = 0;
      end
      #1;
      checks++;
      if (trip != etrip || trip_ch != ech) begin
        failures++;
        $display("trip %b/%b exp %b/%b", trip, trip_ch, etrip, ech);
      end
    end
    // directed: a clear that arrives together with an overcurrent must not release
    for (int n = 0; n < 4; n++) begin
      sample[0] = 8'd250; sample[1] = 8'd10; sample_valid = 1; clear = 1;
      @(posedge clk); #1;
      checks++;
      if (!trip || !trip_ch[0]) begin failures++; $display("clear released a live overcurrent"); end
      sample[0] = 8'd10; clear = 1;
      @(posedge clk); #1;
      checks++;
      if (trip) begin failures++; $display("clear did not release"); end
    end
    clear = 0; sample_valid = 0;
    checks++;
    if (n_trips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
