// dvm_ctrl: dynamic vulnerability management of the issue queue.
//
// DVM keeps the IQ's online AVF under a reliability target by throttling
// dispatch. Its rules, taken from the document:
//  1. a context with an L2 miss pending may not dispatch;
//  2. every sub-interval (sub_tick, five per 10K-cycle interval) wq_ratio is
//     halved when the online AVF is above the trigger threshold and
//     incremented otherwise: slow increase, fast decrease;
//  3. every RATIO_PERIOD = 50 cycles the ratio waiting/ready instructions in
//     the IQ is computed (an integer division, done here by serial_divider);
//     while it exceeds wq_ratio no thread may dispatch;
//  4. if every thread is stalled by L2 misses and the online AVF is below the
//     trigger, the thread with the fewest ACE instructions in its fetch queue
//     is allowed to dispatch again.
// This design's choices: wq_ratio starts at WQ_INIT and saturates at WQ_MAX;
// halving is a right shift (it can reach 0); no ready instructions counts
// as an infinite ratio, unless the queue is empty (ratio 0); rule 3's verdict holds until the
// next division finishes; the "below trigger" test is !avf_above_trig; ties in
// rule 4 go to the lowest thread index. Where the document's pseudo code says
// "most un-ACE instructions" for rule 4, its prose says "fewest ACE
// instructions in the fetch queue"; the prose is followed.
//
// Timing: thread_en is combinational from the registered state and pending.
module dvm_ctrl #(
  parameter int unsigned N_THREADS    = 4,
  parameter int unsigned IQ_SIZE      = 96,
  parameter int unsigned RATIO_PERIOD = 50,
  parameter int unsigned FQ_W         = 8,
  parameter int unsigned WQ_INIT      = 4,
  parameter int unsigned WQ_MAX       = 255,
  localparam int unsigned CW  = $clog2(IQ_SIZE + 1),
  localparam int unsigned PW  = $clog2(RATIO_PERIOD),
  localparam int unsigned RW  = $clog2(WQ_MAX + 1),
  localparam int unsigned TIW = (N_THREADS > 1) ? $clog2(N_THREADS) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [N_THREADS-1:0]            pending,
  input  logic                            sub_tick,
  input  logic                            avf_above_trig,
  input  logic [CW-1:0]                   wql,
  input  logic [CW-1:0]                   rql,
  input  logic [N_THREADS-1:0][FQ_W-1:0]  fq_ace_cnt,
  output logic [N_THREADS-1:0]            thread_en,
  output logic [RW-1:0]                   wq_ratio,
  output logic                            ratio_stall,
  output logic                            resume_active
);

  // ------------------------------------------------ rule 2: wq_ratio update
  always_ff @(posedge clk) begin
    if (!rst_n)
      wq_ratio <= RW'(WQ_INIT);
    else if (sub_tick) begin
      if (avf_above_trig)            wq_ratio <= wq_ratio >> 1;
      else if (wq_ratio != RW'(WQ_MAX)) wq_ratio <= wq_ratio + RW'(1);
    end
  end

  // -------------------------------------- rule 3: waiting / ready every 50
  logic [PW-1:0] per_q;
  logic          div_start, div_busy, div_done;
  logic [CW-1:0] quot;

  assign div_start = (per_q == '0) && !div_busy;

  serial_divider #(.W(CW)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (wql),
    .divisor  (rql),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quot)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      per_q       <= '0;
      ratio_stall <= 1'b0;
    end else begin
      per_q <= (per_q == PW'(RATIO_PERIOD - 1)) ? '0 : per_q + PW'(1);
      if (div_done)
        ratio_stall <= ((RW > CW ? RW : CW)+1)'(quot) > ((RW > CW ? RW : CW)+1)'(wq_ratio);
    end
  end

  // ------------------------------------------------------ rule 1 and rule 4
  logic [TIW-1:0] pick;

  always_comb begin
    pick = '0;
    for (int unsigned t = 1; t < N_THREADS; t++)
      if (fq_ace_cnt[t] < fq_ace_cnt[pick]) pick = TIW'(t);
    resume_active = (&pending) && !avf_above_trig;
    for (int unsigned t = 0; t < N_THREADS; t++)
      thread_en[t] = !ratio_stall
                     && (!pending[t] || (resume_active && pick == TIW'(t)));
  end

endmodule
