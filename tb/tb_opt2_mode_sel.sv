// tb_opt2_mode_sel: self-checking test of the L2-miss sensitive policy
// choice. Each 10K-cycle interval receives a chosen number of L2 misses
// (including exactly 16 and 17, several threads in one cycle) spread at random
// cycles; after the interval flush_mode must be 1 exactly when the count
// exceeded 16, and must not change inside an interval.
module tb_opt2_mode_sel;
  localparam int NT = 4, INTV = 10000, T = 16;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] miss_start;
  logic flush_mode, interval_end;
  opt2_mode_sel #(.N_THREADS(NT), .INTERVAL(INTV), .T_CACHE_MISS(T)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int counts [9] = '{0, 16, 17, 40, 5, 17, 16, 100, 3};
    miss_start = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(flush_mode == 0, "reset");
    foreach (counts[k]) begin
      int left, got, prev_mode;
      left = counts[k]; got = 0; prev_mode = flush_mode;
      for (int c = 0; c < INTV; c++) begin
        miss_start = '0;
        for (int t = 0; t < NT; t++)
          if (left > 0 && ($urandom_range(INTV - 1, 0) < 4 * counts[k] || INTV - c <= left)) begin
            miss_start[t] = 1; left--; got++;
          end
        #1;
        check(interval_end == (c == INTV - 1), "interval_end position");
        check(flush_mode == prev_mode, "flush_mode stable inside interval");
        @(posedge clk); #1;
      end
      check(got == counts[k], "driver delivered the planned misses");
      check(flush_mode == (got > T), $sformatf("interval %0d misses %0d flush_mode %0b", k, got, flush_mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
