// tb_workload_mix: runs CPU, MIX and MEM style 4-thread mixes through the
// issue queue subsystem at its default sizes, under both schemes.
//
// The thread model is the same as in tb_smt_iq_top (dependent instruction
// streams, 60% ACE, 2-cycle execution, 200-cycle L2 misses, a 96-instruction
// window per thread). A computation-bound thread has no L2-missing loads; a
// memory-bound thread has 1.5% of them. CPU runs four computation-bound
// threads, MIX two of each, MEM four memory-bound threads. Each mix runs five
// 10K-cycle intervals with SCHEME_OPT2, then five with SCHEME_DVM whose
// reliability target is 0.5 x the highest interval AVF seen in the OPT2 run.
// Reported per run: throughput IPC, mean IQ AVF and the share of intervals
// whose AVF exceeded that target (PVE). Checked: dataflow and ACE-first
// order of every issued instruction, full drain after each run, progress
// (IPC above 0.5) and that DVM's PVE does not exceed OPT2's at that target.
module tb_workload_mix;
  import iq_pkg::*;
  localparam int unsigned CW = $clog2(IQ_SIZE + 1);
  localparam int unsigned SW = $clog2(ISSUE_W + 1);
  localparam int unsigned KW = $clog2(COMMIT_W + 1);
  localparam int unsigned AW = $clog2(IQ_SIZE * ENTRY_BITS + 1);
  localparam int unsigned ACCW = $clog2(IQ_SIZE * ENTRY_BITS * INTERVAL + 1);
  localparam int MISS_LAT = 200, EXE_LAT = 2, ROB = 96, RING = 1024;

  logic clk = 0, rst_n = 0;
  scheme_e cfg_scheme;
  logic [THR_W-1:0] rel_thr;
  logic [DISP_W-1:0] disp_valid, disp_ready;
  iq_inst_t [DISP_W-1:0] disp_inst;
  logic [ISSUE_W-1:0] wb_valid, iss_valid;
  logic [ISSUE_W-1:0][TAG_W-1:0] wb_tag;
  logic [SW-1:0] issue_slots;
  iq_inst_t [ISSUE_W-1:0] iss_inst;
  logic [KW-1:0] commit_cnt;
  logic [N_THREADS-1:0] l2_miss_start, l2_miss_done, thread_flush, thread_dispatch_en;
  logic [N_THREADS-1:0][8:0] inflight;
  logic [N_THREADS-1:0][7:0] fq_ace_cnt;
  logic fetch_valid;
  logic [TID_W-1:0] fetch_tid;
  logic [CW-1:0] occupancy, rql, wql, iql;
  logic [N_THREADS-1:0][CW-1:0] thread_occ;
  logic [AW-1:0] ace_bits;
  logic flush_mode, avf_above_trig, avf_sub_tick, emergency, dvm_ratio_stall, dvm_resume;
  logic [7:0] wq_ratio;
  logic [ACCW-1:0] interval_acc;

  smt_iq_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ thread model
  typedef struct {
    int  idx;
    bit  ace, miss, missed, done, in_iq;
    int  d1, d2;
  } ginst_t;
  ginst_t gen [N_THREADS][RING];
  int head [N_THREADS], ret [N_THREADS];
  int thr_miss [N_THREADS];
  bit drain = 0;

  function automatic int ring(input int idx); return idx % RING; endfunction

  task automatic ensure(input int t, input int idx);
    int r;
    r = ring(idx);
    if (gen[t][r].idx != idx) begin
      gen[t][r].idx    = idx;
      gen[t][r].ace    = $urandom_range(99, 0) < 60;
      gen[t][r].miss   = $urandom_range(9999, 0) < thr_miss[t];
      gen[t][r].missed = 0;
      gen[t][r].done   = 0;
      gen[t][r].in_iq  = 0;
      gen[t][r].d1     = ($urandom_range(3, 0) == 0) ? 0 : $urandom_range(6, 1);
      gen[t][r].d2     = ($urandom_range(1, 0) == 0) ? 0 : $urandom_range(6, 1);
    end
  endtask

  function automatic logic [TAG_W-1:0] tag_of(input int t, input int idx);
    return TAG_W'(t * 128 + idx % 128);
  endfunction

  function automatic bit produced(input int t, input int idx, input int d);
    if (d == 0 || idx - d < 0) return 1;
    return gen[t][ring(idx - d)].done;
  endfunction

  // events
  typedef struct { int t; int idx; } ev_t;
  ev_t bucket [512][$];
  ev_t wbq [$];
  int miss_start_q [N_THREADS], miss_done_due [N_THREADS][$];
  int starts_sent [N_THREADS], dones_sent [N_THREADS];
  int now = 0;

  // mechanism counters
  int n_visa = 0, n_cap_stall = 0, n_cap_set = 0, n_flush_iv = 0, n_flush = 0;
  int n_ratio_stall = 0, n_halve = 0, n_resume = 0, n_l2_stall = 0, n_emerg = 0;
  int n_issued = 0, n_disp = 0, lane_t [DISP_W], lane_i [DISP_W];
  int prev_ratio = 0;
  logic [ACCW-1:0] acc_opt [5];

  task automatic drive();
    int l, tt;
    disp_valid = '0;
    disp_inst  = '0;
    for (int k = 0; k < DISP_W; k++) begin lane_t[k] = -1; lane_i[k] = -1; end
    if (!drain) begin
      l = 0;
      for (int j = 0; j < N_THREADS; j++) begin
        int idx;
        tt = (int'(fetch_tid) + j) % N_THREADS;
        idx = head[tt];
        for (int k = 0; k < DISP_W / N_THREADS; k++) begin
          if (idx - ret[tt] < ROB) begin
            ensure(tt, idx);
            disp_valid[l]         = 1;
            disp_inst[l].tid      = TID_W'(tt);
            disp_inst[l].ace      = gen[tt][ring(idx)].ace;
            disp_inst[l].opc      = OPC_W'(idx);
            disp_inst[l].dst      = tag_of(tt, idx);
            disp_inst[l].src1     = tag_of(tt, idx - gen[tt][ring(idx)].d1);
            disp_inst[l].src2     = tag_of(tt, idx - gen[tt][ring(idx)].d2);
            disp_inst[l].src1_rdy = produced(tt, idx, gen[tt][ring(idx)].d1);
            disp_inst[l].src2_rdy = produced(tt, idx, gen[tt][ring(idx)].d2);
            lane_t[l] = tt; lane_i[l] = idx;
            idx++;
          end
          l++;
        end
      end
    end
    // broadcast finished results
    wb_valid = '0; wb_tag = '0;
    for (int b = 0; b < ISSUE_W && wbq.size() > b; b++) begin
      wb_valid[b] = 1;
      wb_tag[b]   = tag_of(wbq[b].t, wbq[b].idx);
    end
    commit_cnt = KW'($countones(wb_valid));
    issue_slots = SW'($urandom_range(ISSUE_W, 4));
    l2_miss_start = '0; l2_miss_done = '0;
    for (int t = 0; t < N_THREADS; t++) begin
      int c, a;
      if (miss_start_q[t] > 0) l2_miss_start[t] = 1;
      if (miss_done_due[t].size() > 0 && miss_done_due[t][0] <= now && dones_sent[t] < starts_sent[t])
        l2_miss_done[t] = 1;
      c = 0; a = 0;
      for (int i = ret[t]; i < head[t]; i++) if (!gen[t][ring(i)].done) c++;
      for (int i = head[t]; i < head[t] + 8; i++) begin ensure(t, i); a += gen[t][ring(i)].ace; end
      inflight[t]   = 9'(c);
      fq_ace_cnt[t] = 8'(a);
    end
  endtask

  // Checks on the combinational outputs, then the model's clock-edge update.
  task automatic observe_and_step();
    int n_ace_seen;
    bit unace_seen;
    // VISA order inside the issue group, dataflow of every issued instruction
    unace_seen = 0;
    for (int k = 0; k < ISSUE_W; k++) if (iss_valid[k]) begin
      int t, idx;
      t = int'(iss_inst[k].tid);
      idx = int'(iss_inst[k].opc);
      // recover the full index from the low 8 bits within the thread's window
      for (int i = head[t] - 1; i >= 0 && i >= head[t] - 128; i--)
        if (OPC_W'(i) == OPC_W'(idx) && gen[t][ring(i)].in_iq) idx = i;
      check(gen[t][ring(idx)].in_iq && gen[t][ring(idx)].idx == idx, "issued instruction was in the queue");
      check(produced(t, idx, gen[t][ring(idx)].d1) && produced(t, idx, gen[t][ring(idx)].d2),
            $sformatf("thread %0d inst %0d issued before its producers finished", t, idx));
      check(!(unace_seen && iss_inst[k].ace), "ACE instruction issued behind an un-ACE one");
      if (!iss_inst[k].ace) unace_seen = 1;
      gen[t][ring(idx)].in_iq = 0;
      n_issued++;
      if (gen[t][ring(idx)].miss && !gen[t][ring(idx)].missed) begin
        gen[t][ring(idx)].missed = 1;
        miss_start_q[t]++;
        miss_done_due[t].push_back(now + MISS_LAT);
        bucket[(now + MISS_LAT) % 512].push_back('{t, idx});
      end else
        bucket[(now + EXE_LAT) % 512].push_back('{t, idx});
    end
    // mechanisms
    if ($countones(iss_valid) > 0 && iss_inst[0].ace && int'(rql) > $countones(iss_valid)) n_visa++;
    if (cfg_scheme == SCHEME_OPT2 && !flush_mode) begin
      check(occupancy <= iql || iql == 0 || occupancy <= 96, "occupancy within queue");
      if (occupancy >= iql && iql < CW'(IQ_SIZE) && disp_valid != '0 && disp_ready == '0) n_cap_stall++;
    end
    n_flush += $countones(thread_flush);
    if (dvm_ratio_stall && cfg_scheme == SCHEME_DVM) n_ratio_stall++;
    if (dvm_resume && cfg_scheme == SCHEME_DVM) n_resume++;
    if (cfg_scheme == SCHEME_DVM && thread_dispatch_en != '1 && !dvm_ratio_stall) n_l2_stall++;
    if (emergency) n_emerg++;
    if (int'(wq_ratio) < prev_ratio) n_halve++;
    prev_ratio = int'(wq_ratio);
    // dispatch bookkeeping: accepted lanes are a per-thread prefix
    for (int k = 0; k < DISP_W; k++) if (disp_ready[k]) begin
      check(lane_t[k] >= 0, "accepted an invalid lane");
      check(lane_i[k] == head[lane_t[k]], "dispatch out of order within a thread");
      gen[lane_t[k]][ring(lane_i[k])].in_iq = 1;
      head[lane_t[k]]++;
      n_disp++;
    end
    // results broadcast this cycle are done
    for (int b = 0; b < ISSUE_W && wbq.size() > 0 && wb_valid[b]; b++) begin
      ev_t e;
      e = wbq.pop_front();
      gen[e.t][ring(e.idx)].done = 1;
    end
    // flush: refetch from the oldest flushed instruction
    for (int t = 0; t < N_THREADS; t++) begin
      if (l2_miss_start[t]) begin miss_start_q[t]--; starts_sent[t]++; end
      if (l2_miss_done[t])  begin void'(miss_done_due[t].pop_front()); dones_sent[t]++; end
      if (thread_flush[t]) begin
        int m;
        m = head[t];
        for (int i = (head[t] >= 128 ? head[t] - 128 : 0); i < head[t]; i++)
          if (gen[t][ring(i)].in_iq) begin
            if (i < m) m = i;
            gen[t][ring(i)].in_iq = 0;
          end
        head[t] = m;
      end
      while (ret[t] < head[t] && gen[t][ring(ret[t])].done) ret[t]++;
    end
    now++;
    foreach (bucket[now % 512][q]) wbq.push_back(bucket[now % 512][q]);
    bucket[now % 512].delete();
  endtask

  task automatic run_cycles(input int n);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      drive();
      #1;
      observe_and_step();
    end
  endtask

  task automatic start_run(input scheme_e s);
    rst_n = 0;
    cfg_scheme = s;
    drain = 0;
    for (int t = 0; t < N_THREADS; t++) begin
      head[t] = 0; ret[t] = 0; miss_start_q[t] = 0; starts_sent[t] = 0; dones_sent[t] = 0;
      miss_done_due[t].delete();
      for (int r = 0; r < RING; r++) gen[t][r].idx = -1;
    end
    wbq.delete();
    for (int b = 0; b < 512; b++) bucket[b].delete();
    drive();
    disp_valid = '0; issue_slots = '0; wb_valid = '0;
    l2_miss_start = '0; l2_miss_done = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
  endtask

  task automatic drain_and_check();
    drain = 1;
    run_cycles(2 * MISS_LAT + 100);
    check(occupancy == 0, $sformatf("queue drained (occupancy %0d)", occupancy));
    for (int t = 0; t < N_THREADS; t++) check(dones_sent[t] == starts_sent[t], "all L2 misses resolved");
  endtask

  function automatic real avf_of(input longint acc);
    return real'(acc) / (real'(INTERVAL) * IQ_SIZE * ENTRY_BITS);
  endfunction

  initial begin
    string names [3] = '{"CPU", "MIX", "MEM"};
    for (int w = 0; w < 3; w++) begin
      real max_avf, sum_avf, tgt;
      int pve_opt, pve_dvm, iss0;
      for (int t = 0; t < N_THREADS; t++)
        thr_miss[t] = (w == 0) ? 0 : (w == 1) ? ((t % 2) ? 150 : 0) : 150;
      // ---- OPT2
      rel_thr = 16'hFFFF;
      start_run(SCHEME_OPT2);
      iss0 = n_issued; max_avf = 0; sum_avf = 0;
      for (int iv = 0; iv < 5; iv++) begin
        run_cycles(INTERVAL);
        if (avf_of(interval_acc) > max_avf) max_avf = avf_of(interval_acc);
        sum_avf += avf_of(interval_acc);
        acc_opt[iv] = interval_acc;
      end
      tgt = 0.5 * max_avf;
      pve_opt = 0;
      for (int iv = 0; iv < 5; iv++) if (avf_of(acc_opt[iv]) > tgt) pve_opt++;
      $display("%s OPT2: IPC %0.2f  mean AVF %0.3f  max AVF %0.3f  PVE at 0.5*max %0d/5",
               names[w], real'(n_issued - iss0) / (5.0 * INTERVAL), sum_avf / 5, max_avf, pve_opt);
      check(real'(n_issued - iss0) / (5.0 * INTERVAL) > 0.5, {names[w], " OPT2 made too little progress"});
      drain_and_check();
      // ---- DVM at 0.5 x max AVF
      rel_thr = THR_W'(int'(tgt * 65536.0));
      start_run(SCHEME_DVM);
      iss0 = n_issued; sum_avf = 0; pve_dvm = 0;
      for (int iv = 0; iv < 5; iv++) begin
        run_cycles(INTERVAL);
        sum_avf += avf_of(interval_acc);
        if (avf_of(interval_acc) > tgt) pve_dvm++;
      end
      $display("%s DVM:  IPC %0.2f  mean AVF %0.3f  target %0.3f  PVE %0d/5  wq_ratio %0d",
               names[w], real'(n_issued - iss0) / (5.0 * INTERVAL), sum_avf / 5, tgt, pve_dvm, wq_ratio);
      check(real'(n_issued - iss0) / (5.0 * INTERVAL) > 0.5, {names[w], " DVM made too little progress"});
      check(pve_dvm <= pve_opt, {names[w], " DVM exceeded the target more often than OPT2"});
      drain_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
