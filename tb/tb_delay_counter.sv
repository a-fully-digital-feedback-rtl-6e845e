// tb_delay_counter: self-checking test of the delay step counter: one step
// per inc pulse, saturation at 31, clear.
module tb_delay_counter;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [4:0] cnt;
  logic at_max;
  int checks = 0, failures = 0;
  int expv = 0;

  delay_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    checks++; if (cnt != 0) failures++;
    for (int n = 0; n < 2000; n++) begin
      inc <= ($urandom_range(0, 2) != 0);
      clr <= ($urandom_range(0, 150) == 0);
      @(posedge clk); #1;
      if (clr) expv = 0;
      else if (inc && expv < 31) expv++;
      checks++;
      if (int'(cnt) != expv || at_max != (expv == 31)) begin
        failures++;
        $display("cnt %0d exp %0d at_max %b", cnt, expv, at_max);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
