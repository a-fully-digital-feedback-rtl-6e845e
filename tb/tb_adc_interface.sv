// tb_adc_interface: self-checking test of the ADC clock and capture logic:
// adc_clk must toggle every cycle (half the system clock), sample_valid must
// pulse every second cycle, and each captured word must be the bus value
// sampled two edges before the valid cycle.
module tb_adc_interface;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic adc_clk;
  logic [7:0] adc_data [N];
  logic [7:0] sample [N];
  logic sample_valid;
  logic [7:0] hist [N][4];
  logic prev_adc_clk;
  int checks = 0, failures = 0, valids = 0, cycles = 0;

  adc_interface #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) adc_data[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    prev_adc_clk = adc_clk;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N; i++) adc_data[i] = 8'($urandom_range(0, 255));
      for (int i = 0; i < N; i++) begin
        hist[i][3] = hist[i][2]; hist[i][2] = hist[i][1]; hist[i][1] = hist[i][0]; hist[i][0] = adc_data[i];
      end
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (adc_clk == prev_adc_clk) begin failures++; $display("adc_clk did not toggle"); end
      prev_adc_clk = adc_clk;
      if (sample_valid) begin
        valids++;
        for (int i = 0; i < N; i++) begin
          checks++;
          // hist[i][0] was sampled at the edge just passed, hist[i][1] one edge earlier
          if (n > 2 && sample[i] !== hist[i][1]) begin
            failures++;
            $display("ch%0d sample %0d exp %0d", i, sample[i], hist[i][1]);
          end
        end
      end
    end
    checks++;
    if (valids != cycles / 2) begin failures++; $display("valid count %0d of %0d cycles", valids, cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
