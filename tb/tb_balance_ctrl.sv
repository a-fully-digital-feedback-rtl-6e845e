// tb_balance_ctrl: self-checking test of the balancing factor logic.
// Random evaluations (peaks near each other, so the tolerance band and the
// max-min spread both matter) are compared with a reference of the rule:
// BF = Imax(t) - Imax(t-1); step the counter of the max-peak IGBT when
// |BF| > 2 and Imax - Imin > 4. Also checks that inc is a one-cycle pulse
// one cycle after eval, and that both outcomes and the hold case occur.
module tb_balance_ctrl;
  localparam int N = 2;
  logic clk = 0, rst_n = 0, eval = 0;
  logic [7:0] max_val = 0, min_val = 0;
  logic [0:0] max_idx = 0;
  logic [N-1:0] inc;
  logic signed [8:0] bf;
  logic held;
  int checks = 0, failures = 0, n_trig = 0, n_hold = 0, n_quiet = 0;
  int prev = 0;

  balance_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, mn, ebf;
    bit etrig, ehold;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    mx = 100;
    for (int n = 0; n < 3000; n++) begin
      mx = mx + $urandom_range(0, 10) - 5;
      if (mx < 10) mx = 10;
      if (mx > 250) mx = 250;
      mn = mx - $urandom_range(0, 8);
      max_val <= 8'(mx); min_val <= 8'(mn); max_idx <= 1'($urandom_range(0, 1));
      eval <= 1;
      @(posedge clk);
      eval <= 0;
      ebf = mx - prev;
      etrig = (ebf > 2 || ebf < -2) && (mx - mn > 4);
      ehold = (mx - mn > 4) && !(ebf > 2 || ebf < -2);
      prev = mx;
      #1;
      checks += 3;
      if (int'(bf) != ebf) begin failures++; $display("bf %0d exp %0d", bf, ebf); end
      if (inc != (etrig ? (2'b01 << max_idx) : 2'b00)) begin failures++; $display("inc %b exp trig %b idx %0d", inc, etrig, max_idx); end
      if (held != ehold) begin failures++; $display("held %b exp %b", held, ehold); end
      if (etrig) n_trig++; else if (ehold) n_hold++; else n_quiet++;
      repeat ($urandom_range(1, 3)) begin
        @(posedge clk); #1;
        checks++;
        if (inc != 0) begin failures++; $display("inc longer than one cycle"); end
      end
    end
    checks++;
    if (n_trig == 0 || n_hold == 0 || n_quiet == 0) begin failures++; $display("a decision case never occurred"); end
    $display("trig %0d hold %0d quiet %0d", n_trig, n_hold, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
