// tb_delay_mux: self-checking test of the delay selection multiplexer.
// A PWM signal with random on and off times (at least 40 cycles) drives the
// line; the turn-on select changes at each PWM falling edge and the turn-off
// select at each rising edge, as the counters do in the full design. Every
// gate edge is checked against its expected cycle: rising sel_on+1 edges
// after the edge that samples the PWM high, falling 31-sel_off+1 edges after
// the edge that samples it low (10 ns per cycle).
module tb_delay_mux;
  logic clk = 0, rst_n = 0, pwm = 0;
  logic [4:0] sel_on = 0, sel_off = 0;
  logic gate, gate_q = 0;
  int checks = 0, failures = 0, cyc = 0;
  int exp_rise[$], exp_fall[$];

  delay_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gate edge monitor
  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n && gate != gate_q) begin
      checks++;
      if (gate) begin
        if (exp_rise.size() == 0 || exp_rise[0] != cyc) begin
          failures++; $display("unexpected rise at %0d", cyc);
        end
        if (exp_rise.size() != 0) void'(exp_rise.pop_front());
      end else begin
        if (exp_fall.size() == 0 || exp_fall[0] != cyc) begin
          failures++; $display("unexpected fall at %0d", cyc);
        end
        if (exp_fall.size() != 0) void'(exp_fall.pop_front());
      end
    end
    gate_q = gate;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    for (int p = 0; p < 300; p++) begin
      // rising PWM edge: sampled at the next clock edge (cycle cyc+1)
      @(negedge clk);
      pwm = 1;
      if (p > 0) sel_off = 5'($urandom_range(0, 31));
      exp_rise.push_back(cyc + 1 + int'(sel_on) + 1);
      repeat ($urandom_range(40, 90)) @(negedge clk);
      pwm = 0;
      sel_on = 5'($urandom_range(0, 31));
      exp_fall.push_back(cyc + 1 + (31 - int'(sel_off)) + 1);
      repeat ($urandom_range(40, 90)) @(negedge clk);
    end
    repeat (80) @(posedge clk);
    checks++;
    if (exp_rise.size() != 0 || exp_fall.size() != 0) begin failures++; $display("missing gate edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
