// tb_peak_ram: self-checking test of the two-entry peak RAM: random writes,
// clears and reads on both ports compared with a reference array, including
// clear winning over a write to the same entry.
module tb_peak_ram;
  logic clk = 0, rst_n = 0;
  logic clr = 0, we = 0;
  logic [0:0] clr_addr = 0, addr_a = 0, addr_b = 0;
  logic [7:0] wdata_a = 0, rdata_a, rdata_b;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [2];

  peak_ram #(.W(8), .DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_mem[0] = 0; ref_mem[1] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      clr      <= ($urandom_range(0, 5) == 0);
      clr_addr <= 1'($urandom_range(0, 1));
      we       <= 1'($urandom_range(0, 1));
      addr_a   <= 1'($urandom_range(0, 1));
      addr_b   <= 1'($urandom_range(0, 1));
      wdata_a  <= 8'($urandom_range(0, 255));
      #1;
      checks += 2;
      if (rdata_a !== ref_mem[addr_a]) begin failures++; $display("port A read %0d exp %0d", rdata_a, ref_mem[addr_a]); end
      if (rdata_b !== ref_mem[addr_b]) begin failures++; $display("port B read %0d exp %0d", rdata_b, ref_mem[addr_b]); end
      @(posedge clk);
      if (we && !(clr && clr_addr == addr_a)) ref_mem[addr_a] = wdata_a;
      if (clr) ref_mem[clr_addr] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
