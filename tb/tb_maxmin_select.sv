// tb_maxmin_select: self-checking test of the max-min peak selection with
// random peak values for four IGBTs (lower index wins on ties), and for the
// default two.
module tb_maxmin_select;
  localparam int N = 4;
  logic [7:0] peak [N];
  logic [7:0] max_val, min_val;
  logic [1:0] max_idx, min_idx;
  logic [7:0] peak2 [2];
  logic [7:0] max2, min2;
  logic [0:0] maxi2, mini2;
  int checks = 0, failures = 0;

  maxmin_select #(.N(N), .W(8)) dut (.*);
  maxmin_select dut2 (.peak(peak2), .max_val(max2), .max_idx(maxi2), .min_val(min2), .min_idx(mini2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int emx, emn, imx, imn;
      for (int i = 0; i < N; i++) peak[i] = 8'($urandom_range(0, (n < 1500) ? 255 : 3));
      emx = -1; emn = 256; imx = 0; imn = 0;
      for (int i = 0; i < N; i++) begin
        if (int'(peak[i]) > emx) begin emx = int'(peak[i]); imx = i; end
        if (int'(peak[i]) < emn) begin emn = int'(peak[i]); imn = i; end
      end
      peak2[0] = peak[0]; peak2[1] = peak[1];
      #1;
      checks++;
      if (max_val != 8'(emx) || max_idx != 2'(imx) || min_val != 8'(emn) || min_idx != 2'(imn)) begin
        failures++;
        $display("N=4: got max %0d@%0d min %0d@%0d exp %0d@%0d %0d@%0d", max_val, max_idx, min_val, min_idx, emx, imx, emn, imn);
      end
      checks++;
      if (max2 != ((peak[1] > peak[0]) ? peak[1] : peak[0]) || maxi2 != (peak[1] > peak[0]) ||
          min2 != ((peak[1] < peak[0]) ? peak[1] : peak[0]) || mini2 != (peak[1] < peak[0])) begin
        failures++;
        $display("N=2 mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
