// flush_policy: FLUSH fetch policy response to L2 misses.
//
// While enabled, a thread that takes a new L2 miss (miss_start) is stalled
// and all its instructions in the issue queue are flushed (flush pulse in the
// same cycle). The thread stays stalled until it has no L2 miss pending, and
// the front end then refetches it. At least one thread is always left
// running: a miss in the last running thread does not stall it. Threads are
// considered in index order when several miss in the same cycle. Stalling and
// flushing on L2 misses and keeping one thread alive are the document's
// description of FLUSH; the order rule and keeping a stall until the miss
// resolves even if FLUSH is switched off meanwhile are this design's.
//
// Timing: flush is combinational from miss_start; stalled is registered.
module flush_policy #(
  parameter int unsigned N_THREADS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [N_THREADS-1:0] miss_start,
  input  logic [N_THREADS-1:0] pending,
  output logic [N_THREADS-1:0] flush,
  output logic [N_THREADS-1:0] stalled
);

  logic [N_THREADS-1:0] stalled_q, stalled_d;

  always_comb begin
    int unsigned running;
    // Release threads whose misses have all resolved.
    stalled_d = stalled_q & pending;
    flush     = '0;
    running   = 0;
    for (int unsigned t = 0; t < N_THREADS; t++) running += int'(!stalled_d[t]);
    for (int unsigned t = 0; t < N_THREADS; t++) begin
      if (enable && miss_start[t] && !stalled_d[t] && running > 1) begin
        stalled_d[t] = 1'b1;
        flush[t]     = 1'b1;
        running      = running - 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) stalled_q <= '0;
    else        stalled_q <= stalled_d;
  end

  assign stalled = stalled_q;

endmodule
