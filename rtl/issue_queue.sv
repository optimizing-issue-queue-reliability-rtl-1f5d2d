// issue_queue: shared issue queue of an SMT core with VISA (ACE-first) issue.
//
// The queue holds decoded instructions of all hardware contexts until both
// source operands are ready. Each entry stores the instruction fields of
// iq_inst_t plus a valid bit; a matrix of age masks (older[i][j] = entry j was
// dispatched before entry i) keeps program (dispatch) order across threads.
//
// Dispatch: up to DISP_W lanes per cycle, taken in lane order. A lane is
// accepted when it is valid, its thread is enabled, and fewer than
// min(disp_limit, free entries) lanes ahead of it were accepted, so each
// thread stays in order. The k-th accepted lane fills the k-th free entry.
// A source whose tag is broadcast in the same cycle is captured as ready.
// disp_limit is how the allocation controllers cap IQ utilization.
//
// Wakeup: wb_valid/wb_tag broadcast up to ISSUE_W result tags per cycle;
// matching source operands become ready at the next clock edge.
//
// Issue: visa_select grants up to issue_slots ready entries, ACE first, each
// class oldest first. Lane k of iss_* carries the k-th instruction in that
// priority order; the outputs are combinational from the queue state and the
// entries leave the queue at the clock edge.
//
// Flush: flush_thread[t] removes every entry of thread t at the clock edge
// (the FLUSH fetch policy's response to an L2 miss); lanes of a thread being
// flushed are refused.
//
// Status (combinational, from the state): occupancy, ready queue length
// (rql), waiting queue length (wql), per-thread occupancy, and ace_bits, the
// number of ACE bits resident: all ENTRY_BITS of an ACE instruction, only the
// UNACE_BITS opcode bits of an un-ACE one. The ACE-first policy, the ready and
// waiting queue notions and the ACE-bit count follow the document; the entry
// layout, widths and the dispatch lane rules are this design's own choices.
module issue_queue
  import iq_pkg::*;
#(
  parameter int unsigned N       = IQ_SIZE,
  parameter int unsigned ISS_W   = ISSUE_W,
  parameter int unsigned DSP_W   = DISP_W,
  localparam int unsigned CW     = $clog2(N + 1),
  localparam int unsigned SW     = $clog2(ISS_W + 1),
  localparam int unsigned AW     = $clog2(N * ENTRY_BITS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // dispatch
  input  logic [DSP_W-1:0]         disp_valid,
  input  iq_inst_t [DSP_W-1:0]     disp_inst,
  output logic [DSP_W-1:0]         disp_ready,
  input  logic [CW-1:0]            disp_limit,
  input  logic [N_THREADS-1:0]     thread_en,
  // wakeup
  input  logic [ISS_W-1:0]         wb_valid,
  input  logic [ISS_W-1:0][TAG_W-1:0] wb_tag,
  // issue
  input  logic [SW-1:0]            issue_slots,
  output logic [ISS_W-1:0]         iss_valid,
  output iq_inst_t [ISS_W-1:0]     iss_inst,
  // flush
  input  logic [N_THREADS-1:0]     flush_thread,
  // status
  output logic [CW-1:0]            occupancy,
  output logic [CW-1:0]            rql,
  output logic [CW-1:0]            wql,
  output logic [N_THREADS-1:0][CW-1:0] thread_occ,
  output logic [AW-1:0]            ace_bits
);

  logic     [N-1:0]          valid_q;
  iq_inst_t [N-1:0]          ent_q;
  logic     [N-1:0][N-1:0]   older_q;

  // ---------------------------------------------------------------- status
  logic [N-1:0] ready, req_ace, req_unace;

  always_comb begin
    occupancy  = '0;
    rql        = '0;
    ace_bits   = '0;
    thread_occ = '0;
    for (int unsigned i = 0; i < N; i++) begin
      ready[i]     = valid_q[i] && ent_q[i].src1_rdy && ent_q[i].src2_rdy;
      req_ace[i]   = ready[i] &&  ent_q[i].ace;
      req_unace[i] = ready[i] && !ent_q[i].ace;
      occupancy   += CW'(valid_q[i]);
      rql         += CW'(ready[i]);
      if (valid_q[i]) begin
        ace_bits += ent_q[i].ace ? AW'(ENTRY_BITS) : AW'(UNACE_BITS);
        thread_occ[ent_q[i].tid] += CW'(1);
      end
    end
    wql = occupancy - rql;
  end

  // ----------------------------------------------------------------- issue
  logic [N-1:0]          grant;
  logic [N-1:0][CW-1:0]  rank;
  logic [SW-1:0]         grant_cnt;

  visa_select #(.N(N), .W(ISS_W)) u_select (
    .req_ace    (req_ace),
    .req_unace  (req_unace),
    .older_mask (older_q),
    .slots      (issue_slots),
    .grant      (grant),
    .rank       (rank),
    .grant_cnt  (grant_cnt)
  );

  for (genvar k = 0; k < ISS_W; k++) begin : g_lane
    always_comb begin
      iss_valid[k] = (k < grant_cnt);
      iss_inst[k]  = '0;
      for (int unsigned i = 0; i < N; i++)
        if (grant[i] && rank[i] == CW'(k)) iss_inst[k] = ent_q[i];
    end
  end

  // -------------------------------------------------------------- dispatch
  logic [CW-1:0]          free_cnt, limit;
  logic [DSP_W-1:0][CW-1:0] acc_idx;   // position among accepted lanes
  logic [CW-1:0]          n_acc;
  iq_inst_t [DSP_W-1:0]   disp_woken;

  always_comb begin
    free_cnt = CW'(N) - occupancy;
    limit    = (disp_limit < free_cnt) ? disp_limit : free_cnt;
    n_acc    = '0;
    for (int unsigned l = 0; l < DSP_W; l++) begin
      acc_idx[l]    = n_acc;
      disp_ready[l] = disp_valid[l] && thread_en[disp_inst[l].tid]
                      && !flush_thread[disp_inst[l].tid] && (n_acc < limit);
      if (disp_ready[l]) n_acc += CW'(1);
      disp_woken[l] = disp_inst[l];
      for (int unsigned b = 0; b < ISS_W; b++) begin
        if (wb_valid[b] && wb_tag[b] == disp_inst[l].src1) disp_woken[l].src1_rdy = 1'b1;
        if (wb_valid[b] && wb_tag[b] == disp_inst[l].src2) disp_woken[l].src2_rdy = 1'b1;
      end
    end
  end

  // Entry i takes the lane whose accepted position equals the number of free
  // entries below i.
  logic [N-1:0]          alloc;
  logic [N-1:0][CW-1:0]  alloc_pos;
  iq_inst_t [N-1:0]      alloc_inst;

  always_comb begin
    logic [CW-1:0] fr;
    fr = '0;
    for (int unsigned i = 0; i < N; i++) begin
      alloc[i]      = 1'b0;
      alloc_pos[i]  = fr;
      alloc_inst[i] = '0;
      if (!valid_q[i]) begin
        for (int unsigned l = 0; l < DSP_W; l++)
          if (disp_ready[l] && acc_idx[l] == fr) begin
            alloc[i]      = 1'b1;
            alloc_inst[i] = disp_woken[l];
          end
        fr += CW'(1);
      end
    end
  end

  // ----------------------------------------------------------------- state
  // The age masks need no reset: a row is rewritten when its entry is
  // allocated and a column only matters while its entry is valid.
  for (genvar i = 0; i < N; i++) begin : g_entry
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        valid_q[i] <= 1'b0;
        ent_q[i]   <= '0;
      end else if (alloc[i]) begin
        valid_q[i] <= 1'b1;
        ent_q[i]   <= alloc_inst[i];
      end else begin
        if (grant[i] || flush_thread[ent_q[i].tid]) valid_q[i] <= 1'b0;
        for (int unsigned b = 0; b < ISS_W; b++) begin
          if (wb_valid[b] && wb_tag[b] == ent_q[i].src1) ent_q[i].src1_rdy <= 1'b1;
          if (wb_valid[b] && wb_tag[b] == ent_q[i].src2) ent_q[i].src2_rdy <= 1'b1;
        end
      end
    end

    always_ff @(posedge clk) begin
      if (alloc[i]) begin
        for (int unsigned j = 0; j < N; j++)
          older_q[i][j] <= (valid_q[j] && !grant[j] && !flush_thread[ent_q[j].tid])
                           || (alloc[j] && alloc_pos[j] < alloc_pos[i]);
      end else begin
        older_q[i] <= older_q[i] & ~alloc;
      end
    end
  end

  // ------------------------------------------------------------ assertions
  a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~valid_q) == '0);
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    (alloc & valid_q) == '0);
  a_grant_slots: assert property (@(posedge clk) disable iff (!rst_n)
    grant_cnt <= issue_slots);

endmodule
