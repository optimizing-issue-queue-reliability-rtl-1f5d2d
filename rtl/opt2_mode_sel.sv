// opt2_mode_sel: L2-cache-miss sensitive choice of the allocation policy
// (optimization 2).
//
// It counts the L2 misses of all threads over each interval of INTERVAL
// cycles. If an interval saw more than T_CACHE_MISS misses, the next interval
// runs with the FLUSH fetch policy (flush_mode = 1); otherwise it runs with
// the IPC/RQL allocation cap of optimization 1 (flush_mode = 0). The
// threshold of 16 and the either/or choice are the document's; measuring the
// miss frequency as a count per sampling interval is this design's reading.
//
// Timing: interval_end is high in the last cycle of an interval; flush_mode
// changes at the edge that ends it. Reset clears flush_mode.
module opt2_mode_sel #(
  parameter int unsigned N_THREADS    = 4,
  parameter int unsigned INTERVAL     = 10000,
  parameter int unsigned T_CACHE_MISS = 16,
  localparam int unsigned TW = $clog2(INTERVAL),
  localparam int unsigned MW = $clog2(T_CACHE_MISS + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_THREADS-1:0] miss_start,
  output logic                 flush_mode,
  output logic                 interval_end
);

  logic [TW-1:0] cyc_q;
  logic [MW-1:0] miss_q, miss_tot;

  // Saturating at T_CACHE_MISS + 1 is enough to decide "more than".
  always_comb begin
    logic [MW+2:0] s;
    s = (MW+3)'(miss_q);
    for (int unsigned t = 0; t < N_THREADS; t++) s += (MW+3)'(miss_start[t]);
    miss_tot = (s > (MW+3)'(T_CACHE_MISS + 1)) ? MW'(T_CACHE_MISS + 1) : MW'(s);
  end

  assign interval_end = (cyc_q == TW'(INTERVAL - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc_q      <= '0;
      miss_q     <= '0;
      flush_mode <= 1'b0;
    end else if (interval_end) begin
      cyc_q      <= '0;
      miss_q     <= '0;
      flush_mode <= (miss_tot > MW'(T_CACHE_MISS));
    end else begin
      cyc_q      <= cyc_q + TW'(1);
      miss_q     <= miss_tot;
    end
  end

endmodule
