// tb_pwm_phase: self-checking test of the PWM sequence tracker: phase must
// follow the PWM command two edges later, and start_on / start_off must pulse
// exactly once, in the first cycle of each new phase.
module tb_pwm_phase;
  import dfc_pkg::*;
  logic clk = 0, rst_n = 0, pwm = 0;
  logic pwm_sync, start_on, start_off;
  phase_e phase;
  logic h0 = 0, h1 = 0, h2 = 0;   // pwm as sampled by the last three edges
  int checks = 0, failures = 0, n_on = 0, n_off = 0, n_rise = 0, n_fall = 0;

  pwm_phase dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    h2 <= h1; h1 <= h0; h0 <= pwm;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        pwm = ~pwm;
        if (pwm) n_rise++; else n_fall++;
      end
      #1;
      if (n > 3) begin
        checks += 3;
        if (phase != (h1 ? PH_ON : PH_OFF)) begin failures++; $display("phase wrong"); end
        if (start_on != (h1 && !h2)) begin failures++; $display("start_on wrong"); end
        if (start_off != (!h1 && h2)) begin failures++; $display("start_off wrong"); end
        if (start_on) n_on++;
        if (start_off) n_off++;
      end
    end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
