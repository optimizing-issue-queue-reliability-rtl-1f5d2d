// dispatch_gate: turns the active scheme's controls into the issue queue's
// dispatch limit and per-thread dispatch enables.
//
// Scheme OPT2 (VISA issue + L2-miss sensitive allocation): in an interval
// with few L2 misses, new entries may be allocated only while occupancy is
// below the cap IQL of optimization 1 (disp_limit = IQL - occupancy, or 0);
// in a FLUSH interval the whole queue may be used and threads stalled by
// FLUSH may not dispatch. Scheme DVM: the whole queue may be used and DVM's
// thread enables apply. fetch_eligible marks the threads the ICOUNT selector
// may choose. The cap test follows the document's rule that no entries are
// allocated once utilization reaches the threshold; applying it so that the
// occupancy never exceeds IQL, and the static scheme select, are this
// design's choices. Purely combinational.
module dispatch_gate
  import iq_pkg::*;
#(
  parameter int unsigned N  = IQ_SIZE,
  parameter int unsigned NT = N_THREADS,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  scheme_e         scheme,
  input  logic [CW-1:0]   occupancy,
  input  logic [CW-1:0]   iql,
  input  logic            flush_mode,
  input  logic [NT-1:0]   flush_stalled,
  input  logic [NT-1:0]   dvm_en,
  output logic [CW-1:0]   disp_limit,
  output logic [NT-1:0]   thread_en,
  output logic [NT-1:0]   fetch_eligible
);

  logic [CW-1:0] cap;

  always_comb begin
    if (scheme == SCHEME_OPT2) begin
      cap       = flush_mode ? CW'(N) : iql;
      thread_en = ~flush_stalled;
    end else begin
      cap       = CW'(N);
      thread_en = dvm_en;
    end
    disp_limit     = (cap > occupancy) ? cap - occupancy : '0;
    fetch_eligible = thread_en;
  end

endmodule
