// tb_dvm_ctrl: self-checking test of dynamic vulnerability management.
// Each round: (a) sub-interval ticks with random AVF verdicts, checking that
// wq_ratio halves above the trigger and grows by one below it (saturating);
// (b) waiting/ready counts held for 110 cycles, after which the all-thread
// stall must equal floor(wql/rql) > wq_ratio (rql = 0 counts as maximal unless wql = 0) and
// must have been decided within one 50-cycle period plus the division;
// (c) random L2-miss masks and fetch-queue ACE counts, checking the thread
// enables, including resuming the thread with the fewest ACE instructions
// when every thread waits on an L2 miss and the AVF is below the trigger.
module tb_dvm_ctrl;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] pending, thread_en;
  logic sub_tick, avf_above_trig, ratio_stall, resume_active;
  logic [6:0] wql, rql;
  logic [NT-1:0][7:0] fq_ace_cnt;
  logic [7:0] wq_ratio;
  dvm_ctrl #(.N_THREADS(NT), .IQ_SIZE(96), .RATIO_PERIOD(50)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, resumes = 0, rstalls = 0, halvings = 0, sat = 0;
  int model_ratio;
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
    pending = '0; sub_tick = 0; avf_above_trig = 0; wql = 0; rql = 0; fq_ace_cnt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model_ratio = 4;
    check(wq_ratio == 4, "initial wq_ratio");
    for (int round = 0; round < 60; round++) begin
      bit exp_rs;
      int q, settle;
      // (a) wq_ratio adaptation
      for (int k = 0; k < ((round == 5) ? 300 : 6); k++) begin
        sub_tick = 1;
        avf_above_trig = (round == 5) ? 0 : ($urandom_range(2, 0) == 0);
        @(posedge clk); #1;
        sub_tick = 0;
        if (avf_above_trig) begin model_ratio = model_ratio / 2; halvings++; end
        else if (model_ratio < 255) model_ratio++;
        else sat++;
        check(int'(wq_ratio) == model_ratio, $sformatf("wq_ratio %0d exp %0d", wq_ratio, model_ratio));
      end
      if (round == 5) begin  // return to small ratios
        for (int k = 0; k < 6; k++) begin
          sub_tick = 1; avf_above_trig = 1; @(posedge clk); #1; sub_tick = 0;
          model_ratio = model_ratio / 2;
        end
        check(int'(wq_ratio) == model_ratio, "wq_ratio after halvings");
      end
      // (b) waiting / ready ratio
      wql = 7'($urandom_range(96, 0));
      rql = 7'((round % 7 == 0) ? 0 : $urandom_range(40, 1));
      q = (rql == 0) ? ((wql == 0) ? 0 : 127) : wql / rql;
      exp_rs = q > model_ratio;
      settle = -1;
      for (int c = 0; c < 110; c++) begin
        @(posedge clk); #1;
        if (ratio_stall == exp_rs && settle < 0) settle = c;
        if (ratio_stall != exp_rs) settle = -1;
      end
      check(ratio_stall == exp_rs, $sformatf("ratio_stall %0b exp %0b (w %0d r %0d ratio %0d)", ratio_stall, exp_rs, wql, rql, model_ratio));
      check(settle <= 50 + 8, $sformatf("ratio decided after %0d cycles", settle));
      if (exp_rs) rstalls++;
      // (c) per-thread enables
      for (int c = 0; c < 20; c++) begin
        int pick;
        bit all_p, res;
        pending = NT'((c % 4 == 0) ? '1 : $urandom);
        avf_above_trig = $urandom_range(1, 0);
        for (int t = 0; t < NT; t++) fq_ace_cnt[t] = 8'($urandom_range(c % 2 ? 3 : 50, 0));
        pick = 0;
        for (int t = 1; t < NT; t++) if (fq_ace_cnt[t] < fq_ace_cnt[pick]) pick = t;
        all_p = (pending == '1);
        res = all_p && !avf_above_trig;
        #1;
        check(resume_active == res, "resume_active");
        for (int t = 0; t < NT; t++)
          check(thread_en[t] == (!exp_rs && (!pending[t] || (res && pick == t))),
                $sformatf("thread_en[%0d]", t));
        if (res && !exp_rs) resumes++;
        @(posedge clk); #1;
      end
      pending = '0;
    end
    check(resumes > 0 && rstalls > 0 && halvings > 0 && sat > 0, "all DVM responses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
