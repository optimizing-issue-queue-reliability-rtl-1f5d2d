// tb_issue_queue: self-checking test of the SMT issue queue.
//
// A reference model in the testbench keeps the queue as a list of
// instructions in dispatch order. Each cycle the testbench drives random
// dispatch lanes, dispatch limit, thread enables, wakeup tags, issue slots
// and occasional thread flushes, and compares against the model: which lanes
// are accepted, which instructions issue and in which lane order (ready ACE
// instructions first, oldest first, then ready un-ACE oldest first), the
// occupancy, ready and waiting counts, per-thread occupancy and ACE-bit count.
// Phases with heavy dispatch fill the queue to its 96 entries; a phase with
// an 8-slot issue and all sources ready checks the issue rate of 8 per cycle.
module tb_issue_queue;
  import iq_pkg::*;
  localparam int unsigned N  = IQ_SIZE;
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned SW = $clog2(ISSUE_W + 1);
  localparam int unsigned AW = $clog2(N * ENTRY_BITS + 1);

  logic clk = 0, rst_n = 0;
  logic [DISP_W-1:0]             disp_valid, disp_ready;
  iq_inst_t [DISP_W-1:0]         disp_inst;
  logic [CW-1:0]                 disp_limit;
  logic [N_THREADS-1:0]          thread_en, flush_thread;
  logic [ISSUE_W-1:0]            wb_valid, iss_valid;
  logic [ISSUE_W-1:0][TAG_W-1:0] wb_tag;
  logic [SW-1:0]                 issue_slots;
  iq_inst_t [ISSUE_W-1:0]        iss_inst;
  logic [CW-1:0]                 occupancy, rql, wql;
  logic [N_THREADS-1:0][CW-1:0]  thread_occ;
  logic [AW-1:0]                 ace_bits;

  issue_queue dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0, full_seen = 0, issued8 = 0;
  iq_inst_t model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit woken(input logic [TAG_W-1:0] t);
    for (int b = 0; b < ISSUE_W; b++) if (wb_valid[b] && wb_tag[b] == t) return 1;
    return 0;
  endfunction

  // Compare DUT outputs with the model, then advance the model by one cycle.
  task automatic check_and_step();
    int exp_occ, exp_rql, exp_bits, n_acc, limit, free;
    int exp_tocc [N_THREADS];
    int order [$];
    bit exp_ready [DISP_W];
    exp_occ = model.size(); exp_rql = 0; exp_bits = 0;
    foreach (exp_tocc[t]) exp_tocc[t] = 0;
    foreach (model[k]) begin
      if (model[k].src1_rdy && model[k].src2_rdy) exp_rql++;
      exp_bits += model[k].ace ? ENTRY_BITS : UNACE_BITS;
      exp_tocc[model[k].tid]++;
    end
    check(int'(occupancy) == exp_occ, $sformatf("occupancy %0d exp %0d", occupancy, exp_occ));
    check(int'(rql) == exp_rql, $sformatf("rql %0d exp %0d", rql, exp_rql));
    check(int'(wql) == exp_occ - exp_rql, "wql");
    check(int'(ace_bits) == exp_bits, $sformatf("ace_bits %0d exp %0d", ace_bits, exp_bits));
    foreach (exp_tocc[t]) check(int'(thread_occ[t]) == exp_tocc[t], "thread_occ");
    if (exp_occ == N) full_seen++;
    // issue: ready ACE in age order, then ready un-ACE in age order
    foreach (model[k]) if (model[k].src1_rdy && model[k].src2_rdy && model[k].ace) order.push_back(k);
    foreach (model[k]) if (model[k].src1_rdy && model[k].src2_rdy && !model[k].ace) order.push_back(k);
    for (int l = 0; l < ISSUE_W; l++) begin
      bit ev;
      ev = (l < order.size()) && (l < int'(issue_slots));
      check(iss_valid[l] == ev, $sformatf("iss_valid[%0d]=%0b exp %0b", l, iss_valid[l], ev));
      if (ev) check(iss_inst[l] == model[order[l]],
                    $sformatf("iss_inst[%0d] dst %0d exp %0d", l, iss_inst[l].dst, model[order[l]].dst));
    end
    if ($countones(iss_valid) == ISSUE_W) issued8++;
    // dispatch acceptance
    free = N - exp_occ;
    limit = (int'(disp_limit) < free) ? int'(disp_limit) : free;
    n_acc = 0;
    for (int l = 0; l < DISP_W; l++) begin
      exp_ready[l] = disp_valid[l] && thread_en[disp_inst[l].tid]
                     && !flush_thread[disp_inst[l].tid] && (n_acc < limit);
      if (exp_ready[l]) n_acc++;
      check(disp_ready[l] == exp_ready[l], $sformatf("disp_ready[%0d]", l));
    end
    // advance the model: issue, flush, wakeup, then append dispatched lanes
    begin
      iq_inst_t nxt [$];
      int n_iss;
      bit gone [$];
      n_iss = (order.size() < int'(issue_slots)) ? order.size() : int'(issue_slots);
      foreach (model[k]) gone.push_back(0);
      for (int p = 0; p < n_iss; p++) gone[order[p]] = 1;
      foreach (model[k]) begin
        iq_inst_t e;
        e = model[k];
        if (gone[k] || flush_thread[e.tid]) continue;
        if (woken(e.src1)) e.src1_rdy = 1;
        if (woken(e.src2)) e.src2_rdy = 1;
        nxt.push_back(e);
      end
      for (int l = 0; l < DISP_W; l++) if (exp_ready[l]) begin
        iq_inst_t e;
        e = disp_inst[l];
        if (woken(e.src1)) e.src1_rdy = 1;
        if (woken(e.src2)) e.src2_rdy = 1;
        nxt.push_back(e);
      end
      model = nxt;
    end
  endtask

  int dst_ctr = 0;

  task automatic drive(input int phase);
    for (int l = 0; l < DISP_W; l++) begin
      disp_valid[l]         = $urandom_range(3, 0) != 0;
      disp_inst[l].tid      = TID_W'($urandom_range(N_THREADS - 1, 0));
      disp_inst[l].ace      = $urandom_range(1, 0);
      disp_inst[l].opc      = OPC_W'($urandom);
      disp_inst[l].src1     = TAG_W'($urandom_range(63, 0));
      disp_inst[l].src2     = TAG_W'($urandom_range(63, 0));
      disp_inst[l].src1_rdy = (phase == 2) || ($urandom_range(2, 0) == 0);
      disp_inst[l].src2_rdy = (phase == 2) || ($urandom_range(2, 0) == 0);
      disp_inst[l].dst      = TAG_W'(dst_ctr++);
    end
    disp_limit  = (phase == 1) ? CW'(N) : CW'($urandom_range(N, 0));
    thread_en   = (phase == 1) ? '1 : N_THREADS'($urandom);
    flush_thread = (phase == 0 && $urandom_range(40, 0) == 0) ? N_THREADS'(1 << $urandom_range(N_THREADS-1, 0)) : '0;
    for (int b = 0; b < ISSUE_W; b++) begin
      wb_valid[b] = (phase != 1) && ($urandom_range(3, 0) == 0);
      wb_tag[b]   = TAG_W'($urandom_range(63, 0));
    end
    issue_slots = (phase == 1) ? SW'($urandom_range(1, 0)) :
                  (phase == 2) ? SW'(ISSUE_W) : SW'($urandom_range(ISSUE_W, 0));
  endtask

  initial begin
    disp_valid = '0; disp_inst = '0; disp_limit = '0; thread_en = '0;
    flush_thread = '0; wb_valid = '0; wb_tag = '0; issue_slots = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int phase;
      phase = (c < 400) ? 0 : (c < 700) ? 1 : (c < 1000) ? 2 : (c / 200) % 3;
      @(negedge clk);
      drive(phase);
      #1;
      check_and_step();
      cycles++;
    end
    check(full_seen > 0, "queue never filled to 96 entries");
    check(issued8 > 0, "never issued 8 instructions in one cycle");
    $display("full cycles=%0d 8-wide issue cycles=%0d", full_seen, issued8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
