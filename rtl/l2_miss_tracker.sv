// l2_miss_tracker: per-context count of outstanding L2 cache misses.
//
// The memory system reports a new L2 miss of thread t with miss_start[t] and
// its resolution with miss_done[t] (one-cycle pulses; both may be high in the
// same cycle). The tracker keeps a saturating counter per thread and reports
// pending[t] while thread t has at least one miss outstanding. Both the FLUSH
// response and DVM's "context has L2 cache misses" test use it. The event
// interface and counter width are this design's own.
//
// Timing: pending reflects events from the previous cycle and earlier.
module l2_miss_tracker #(
  parameter int unsigned N_THREADS = 4,
  parameter int unsigned CNT_W     = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_THREADS-1:0] miss_start,
  input  logic [N_THREADS-1:0] miss_done,
  output logic [N_THREADS-1:0] pending
);

  logic [N_THREADS-1:0][CNT_W-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else begin
      for (int unsigned t = 0; t < N_THREADS; t++) begin
        if (miss_start[t] && !miss_done[t] && cnt_q[t] != '1)
          cnt_q[t] <= cnt_q[t] + CNT_W'(1);
        else if (miss_done[t] && !miss_start[t] && cnt_q[t] != '0)
          cnt_q[t] <= cnt_q[t] - CNT_W'(1);
      end
    end
  end

  always_comb
    for (int unsigned t = 0; t < N_THREADS; t++) pending[t] = (cnt_q[t] != '0);

endmodule
