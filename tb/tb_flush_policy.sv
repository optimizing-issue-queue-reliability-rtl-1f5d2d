// tb_flush_policy: self-checking test of the FLUSH response. A model tracks
// outstanding misses and stalled threads; on every cycle the flush pulses
// and the stalled mask must match it, at least one thread must be running,
// and the case of the last running thread missing (not stalled) must occur.
module tb_flush_policy;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0;
  logic enable;
  logic [NT-1:0] miss_start, pending, flush, stalled;
  flush_policy #(.N_THREADS(NT)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, spared = 0, flushes = 0;
  int cnt [NT];
  bit st [NT];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    enable = 0; miss_start = '0; pending = '0;
    foreach (cnt[t]) begin cnt[t] = 0; st[t] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      int running;
      bit exp_fl [NT];
      enable = (c % 1000) < 800;
      for (int t = 0; t < NT; t++) begin
        pending[t]    = cnt[t] > 0;
        miss_start[t] = $urandom_range(11, 0) == 0;
      end
      // model
      for (int t = 0; t < NT; t++) if (st[t] && !pending[t]) st[t] = 0;
      running = 0;
      for (int t = 0; t < NT; t++) running += !st[t];
      for (int t = 0; t < NT; t++) begin
        exp_fl[t] = 0;
        if (enable && miss_start[t] && !st[t]) begin
          if (running > 1) begin exp_fl[t] = 1; st[t] = 1; running--; end
          else spared++;
        end
      end
      #1;
      for (int t = 0; t < NT; t++) check(flush[t] == exp_fl[t], $sformatf("c=%0d flush[%0d]", c, t));
      flushes += $countones(flush);
      @(posedge clk); #1;
      for (int t = 0; t < NT; t++) check(stalled[t] == st[t], $sformatf("c=%0d stalled[%0d]", c, t));
      check(stalled != '1, "at least one thread running");
      // miss bookkeeping: a miss lasts a random time
      for (int t = 0; t < NT; t++) begin
        if (miss_start[t]) cnt[t]++;
        if (cnt[t] > 0 && $urandom_range(15, 0) == 0) cnt[t]--;
      end
    end
    check(spared > 0, "last running thread never kept running");
    check(flushes > 0, "no flush happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
