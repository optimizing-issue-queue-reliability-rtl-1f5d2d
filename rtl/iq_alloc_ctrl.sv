// iq_alloc_ctrl: dynamic IQ resource allocation (optimization 1).
//
// The controller samples the workload over fixed intervals of INTERVAL
// cycles. It accumulates committed instructions (for IPC) and the ready
// queue length every cycle. At the last cycle of an interval it sets the
// allocation cap IQL for the next interval:
//   IPC <= 2 : IQL = min(RQL + IQ_SIZE/6,   IQ_SIZE/3)
//   IPC <= 4 : IQL = min(RQL + IQ_SIZE/3,   IQ_SIZE/2)
//   IPC <= 6 : IQL = min(RQL + IQ_SIZE/2,   2*IQ_SIZE/3)
//   else     : IQL = min(RQL + 2*IQ_SIZE/3, IQ_SIZE)
// The four IPC regions and their ratios are the document's. This design
// takes RQL as the interval's average ready queue length (floor of sum /
// INTERVAL), compares IPC through the commit count (IPC <= 2 means at most
// 2*INTERVAL commits) so no IPC division is needed, and starts with
// IQL = IQ_SIZE until the first interval has ended.
//
// Timing: interval_end is high in the last cycle of each interval; iql
// changes at the clock edge that ends it. Synchronous active-low reset.
module iq_alloc_ctrl #(
  parameter int unsigned IQ_SIZE  = 96,
  parameter int unsigned INTERVAL = 10000,
  parameter int unsigned COMMIT_W = 8,
  localparam int unsigned CW  = $clog2(IQ_SIZE + 1),
  localparam int unsigned KW  = $clog2(COMMIT_W + 1),
  localparam int unsigned TW  = $clog2(INTERVAL),
  localparam int unsigned SCW = $clog2(COMMIT_W * INTERVAL + 1),
  localparam int unsigned SRW = $clog2(IQ_SIZE * INTERVAL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [KW-1:0] commit_cnt,
  input  logic [CW-1:0] rql,
  output logic [CW-1:0] iql,
  output logic          interval_end
);

  localparam int unsigned A0 = IQ_SIZE / 6,     B0 = IQ_SIZE / 3;
  localparam int unsigned A1 = IQ_SIZE / 3,     B1 = IQ_SIZE / 2;
  localparam int unsigned A2 = IQ_SIZE / 2,     B2 = 2 * IQ_SIZE / 3;
  localparam int unsigned A3 = 2 * IQ_SIZE / 3, B3 = IQ_SIZE;

  logic [TW-1:0]  cyc_q;
  logic [SCW-1:0] commit_sum_q, commit_tot;
  logic [SRW-1:0] rql_sum_q, rql_tot;
  logic [CW-1:0]  rql_avg, next_iql;

  assign interval_end = (cyc_q == TW'(INTERVAL - 1));
  assign commit_tot   = commit_sum_q + SCW'(commit_cnt);
  assign rql_tot      = rql_sum_q + SRW'(rql);
  assign rql_avg      = CW'(rql_tot / SRW'(INTERVAL));

  always_comb begin
    logic [CW:0] sum;
    logic [CW:0] cap;
    if (commit_tot <= SCW'(2 * INTERVAL)) begin
      sum = (CW+1)'(rql_avg) + (CW+1)'(A0);  cap = (CW+1)'(B0);
    end else if (commit_tot <= SCW'(4 * INTERVAL)) begin
      sum = (CW+1)'(rql_avg) + (CW+1)'(A1);  cap = (CW+1)'(B1);
    end else if (commit_tot <= SCW'(6 * INTERVAL)) begin
      sum = (CW+1)'(rql_avg) + (CW+1)'(A2);  cap = (CW+1)'(B2);
    end else begin
      sum = (CW+1)'(rql_avg) + (CW+1)'(A3);  cap = (CW+1)'(B3);
    end
    next_iql = CW'((sum < cap) ? sum : cap);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc_q        <= '0;
      commit_sum_q <= '0;
      rql_sum_q    <= '0;
      iql          <= CW'(IQ_SIZE);
    end else if (interval_end) begin
      cyc_q        <= '0;
      commit_sum_q <= '0;
      rql_sum_q    <= '0;
      iql          <= next_iql;
    end else begin
      cyc_q        <= cyc_q + TW'(1);
      commit_sum_q <= commit_tot;
      rql_sum_q    <= rql_tot;
    end
  end

endmodule
