// smt_iq_top: reliability-optimized issue queue subsystem of a 4-context SMT
// core.
//
// The issue queue is the most soft-error-vulnerable structure of an SMT core:
// it holds many instructions of several threads for many cycles. This block
// lowers its vulnerability with two schemes, selected statically by
// cfg_scheme:
//  * SCHEME_OPT2: VISA issue (ready ACE instructions issue before un-ACE ones)
//    plus optimization 2: in intervals with at most T_CACHE_MISS L2 misses
//    the allocation cap of optimization 1 (from IPC and ready queue length)
//    limits IQ utilization; after an interval with more misses the next
//    interval uses the FLUSH policy (threads that miss in L2 are stalled and
//    their IQ instructions flushed).
//  * SCHEME_DVM: VISA issue plus dynamic vulnerability management, which
//    throttles dispatch from an online AVF estimate so that the IQ AVF stays
//    under the reliability target rel_thr.
// The online AVF monitor runs in both schemes and flags intervals whose AVF
// exceeded rel_thr (vulnerability emergencies). An ICOUNT selector picks the
// thread to fetch among those not stalled.
//
// Everything outside the issue queue is outside this block and connects
// through ports: the front end presents up to DISP_W decoded instructions per
// cycle, each with its 1-bit ACE tag, and sees disp_ready; execution returns
// result tags on wb_*; the function units grant issue_slots per cycle; commit
// reports commit_cnt; the memory system reports L2 misses per thread
// (l2_miss_start / l2_miss_done); the pipeline reports in-flight counts
// (ICOUNT) and ACE instructions per fetch queue (DVM). thread_flush tells the
// front end which threads' IQ instructions were flushed.
//
// Timing: one clock, synchronous active-low reset. Issue and dispatch
// handshakes are combinational within the cycle; all policy state updates at
// the clock edge.
module smt_iq_top
  import iq_pkg::*;
#(
  parameter int unsigned N        = IQ_SIZE,
  parameter int unsigned INTV     = INTERVAL,
  parameter int unsigned T_MISS   = T_CACHE_MISS,
  localparam int unsigned CW   = $clog2(N + 1),
  localparam int unsigned SW   = $clog2(ISSUE_W + 1),
  localparam int unsigned KW   = $clog2(COMMIT_W + 1),
  localparam int unsigned AW   = $clog2(N * ENTRY_BITS + 1),
  localparam int unsigned ACCW = $clog2(N * ENTRY_BITS * INTV + 1),
  localparam int unsigned IFW  = 9,
  localparam int unsigned FQW  = 8,
  localparam int unsigned RW   = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  scheme_e                       cfg_scheme,
  input  logic [THR_W-1:0]              rel_thr,
  // dispatch
  input  logic [DISP_W-1:0]             disp_valid,
  input  iq_inst_t [DISP_W-1:0]         disp_inst,
  output logic [DISP_W-1:0]             disp_ready,
  // wakeup and issue
  input  logic [ISSUE_W-1:0]            wb_valid,
  input  logic [ISSUE_W-1:0][TAG_W-1:0] wb_tag,
  input  logic [SW-1:0]                 issue_slots,
  output logic [ISSUE_W-1:0]            iss_valid,
  output iq_inst_t [ISSUE_W-1:0]        iss_inst,
  // commit, memory system, front end
  input  logic [KW-1:0]                 commit_cnt,
  input  logic [N_THREADS-1:0]          l2_miss_start,
  input  logic [N_THREADS-1:0]          l2_miss_done,
  input  logic [N_THREADS-1:0][IFW-1:0] inflight,
  input  logic [N_THREADS-1:0][FQW-1:0] fq_ace_cnt,
  output logic                          fetch_valid,
  output logic [TID_W-1:0]              fetch_tid,
  output logic [N_THREADS-1:0]          thread_flush,
  output logic [N_THREADS-1:0]          thread_dispatch_en,
  // status
  output logic [CW-1:0]                 occupancy,
  output logic [CW-1:0]                 rql,
  output logic [CW-1:0]                 wql,
  output logic [N_THREADS-1:0][CW-1:0]  thread_occ,
  output logic [AW-1:0]                 ace_bits,
  output logic [CW-1:0]                 iql,
  output logic                          flush_mode,
  output logic [RW-1:0]                 wq_ratio,
  output logic                          avf_above_trig,
  output logic                          avf_sub_tick,
  output logic                          emergency,
  output logic [ACCW-1:0]               interval_acc,
  output logic                          dvm_ratio_stall,
  output logic                          dvm_resume
);

  logic [CW-1:0]                disp_limit;
  logic [N_THREADS-1:0]         pending, flush_stalled, dvm_en, fetch_eligible;
  logic                         alloc_iv_end, opt2_iv_end, avf_iv_end;

  issue_queue #(.N(N), .ISS_W(ISSUE_W), .DSP_W(DISP_W)) u_iq (
    .clk, .rst_n,
    .disp_valid, .disp_inst, .disp_ready,
    .disp_limit,
    .thread_en    (thread_dispatch_en),
    .wb_valid, .wb_tag,
    .issue_slots, .iss_valid, .iss_inst,
    .flush_thread (thread_flush),
    .occupancy, .rql, .wql, .thread_occ, .ace_bits
  );

  iq_alloc_ctrl #(.IQ_SIZE(N), .INTERVAL(INTV), .COMMIT_W(COMMIT_W)) u_alloc (
    .clk, .rst_n, .commit_cnt, .rql, .iql, .interval_end (alloc_iv_end)
  );

  l2_miss_tracker #(.N_THREADS(N_THREADS)) u_miss (
    .clk, .rst_n, .miss_start (l2_miss_start), .miss_done (l2_miss_done),
    .pending
  );

  opt2_mode_sel #(.N_THREADS(N_THREADS), .INTERVAL(INTV), .T_CACHE_MISS(T_MISS)) u_opt2 (
    .clk, .rst_n, .miss_start (l2_miss_start), .flush_mode,
    .interval_end (opt2_iv_end)
  );

  flush_policy #(.N_THREADS(N_THREADS)) u_flush (
    .clk, .rst_n,
    .enable     (cfg_scheme == SCHEME_OPT2 && flush_mode),
    .miss_start (l2_miss_start),
    .pending,
    .flush      (thread_flush),
    .stalled    (flush_stalled)
  );

  ace_avf_monitor #(.INTERVAL(INTV), .N_SUB(N_SUB), .IQ_BITS(N * ENTRY_BITS),
                    .AW(AW), .THR_W(THR_W)) u_avf (
    .clk, .rst_n, .ace_bits, .rel_thr,
    .sub_tick (avf_sub_tick), .interval_end (avf_iv_end),
    .avf_above_trig, .emergency, .interval_acc
  );

  // An L2 miss stalls its thread's dispatch from the cycle it is reported.
  dvm_ctrl #(.N_THREADS(N_THREADS), .IQ_SIZE(N), .RATIO_PERIOD(RATIO_PERIOD),
             .FQ_W(FQW), .WQ_MAX(2**RW - 1)) u_dvm (
    .clk, .rst_n,
    .pending (pending | l2_miss_start),
    .sub_tick (avf_sub_tick), .avf_above_trig,
    .wql, .rql, .fq_ace_cnt,
    .thread_en (dvm_en), .wq_ratio,
    .ratio_stall (dvm_ratio_stall), .resume_active (dvm_resume)
  );

  dispatch_gate #(.N(N), .NT(N_THREADS)) u_gate (
    .scheme (cfg_scheme), .occupancy, .iql, .flush_mode,
    .flush_stalled, .dvm_en,
    .disp_limit, .thread_en (thread_dispatch_en), .fetch_eligible
  );

  icount_select #(.N_THREADS(N_THREADS), .CNT_W(IFW)) u_icount (
    .inflight, .eligible (fetch_eligible),
    .sel_valid (fetch_valid), .sel_tid (fetch_tid)
  );

  // The three interval counters start together at reset and run in step.
  a_intervals_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (alloc_iv_end == opt2_iv_end) && (opt2_iv_end == avf_iv_end));

endmodule
