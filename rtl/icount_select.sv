// icount_select: ICOUNT fetch thread selection.
//
// ICOUNT gives fetch priority to the thread with the fewest instructions in
// flight. Among the threads marked eligible (not stalled by FLUSH or DVM) the
// selector returns the one with the smallest in-flight count; ties go to the
// lowest thread index (this design's choice). sel_valid is low when no thread
// is eligible. The in-flight counts come from the pipeline (decode through
// commit), outside this block. Purely combinational.
module icount_select #(
  parameter int unsigned N_THREADS = 4,
  parameter int unsigned CNT_W     = 9,
  localparam int unsigned TIW = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic [N_THREADS-1:0][CNT_W-1:0] inflight,
  input  logic [N_THREADS-1:0]            eligible,
  output logic                            sel_valid,
  output logic [TIW-1:0]                  sel_tid
);

  always_comb begin
    sel_valid = 1'b0;
    sel_tid   = '0;
    for (int unsigned t = 0; t < N_THREADS; t++)
      if (eligible[t] && (!sel_valid || inflight[t] < inflight[sel_tid])) begin
        sel_valid = 1'b1;
        sel_tid   = TIW'(t);
      end
  end

endmodule
