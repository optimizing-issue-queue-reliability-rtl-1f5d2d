// tb_l2_miss_tracker: self-checking test of the per-thread L2 miss tracker.
// Random miss start / done pulses (done only when a miss is outstanding) are
// counted by a model; pending must equal "count > 0" every cycle.
module tb_l2_miss_tracker;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] miss_start, miss_done, pending;
  l2_miss_tracker #(.N_THREADS(NT)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cnt [NT];
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    miss_start = '0; miss_done = '0;
    foreach (cnt[t]) cnt[t] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      for (int t = 0; t < NT; t++) begin
        miss_start[t] = ($urandom_range(9, 0) == 0) && cnt[t] < 10;
        miss_done[t]  = ($urandom_range(7, 0) == 0) && cnt[t] > 0;
      end
      @(posedge clk); #1;
      for (int t = 0; t < NT; t++) cnt[t] += int'(miss_start[t]) - int'(miss_done[t]);
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (pending[t] != (cnt[t] > 0)) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d t=%0d pending=%0b cnt=%0d", c, t, pending[t], cnt[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
