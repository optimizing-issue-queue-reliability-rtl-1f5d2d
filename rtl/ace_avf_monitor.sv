// ace_avf_monitor: online estimate of the issue queue's AVF.
//
// An ACE-bit counter adds, every cycle, the number of ACE bits resident in the
// issue queue. The AVF of a window is (ACE-bit cycles) / (cycles * IQ_BITS).
// The monitor evaluates it at two granularities:
//  * every sub-interval (INTERVAL / N_SUB cycles) it compares the window's
//    AVF with the trigger threshold, 90% of the reliability threshold, and
//    holds the result in avf_above_trig until the next sub-interval ends;
//  * every interval it compares the interval's AVF with the reliability
//    threshold itself and pulses `emergency` when it is exceeded (the
//    intervals counted by the percentage-of-vulnerability-emergencies
//    metric).
// The comparisons are made without division: AVF > thr is tested as
// acc * 2^THR_W > thr * cycles * IQ_BITS, with thresholds in unsigned Q0.16.
// The 10K-cycle interval, the five samples per interval and the 90% trigger
// are the document's; the fixed-point format, using each sub-interval's own
// bits (not a running total), trig = floor(9*thr/10) and avf_above_trig = 0
// before the first sample are this design's choices.
//
// Timing: sub_tick / interval_end are high in the last cycle of their window;
// avf_above_trig, emergency and interval_acc update at that clock edge
// (emergency is then high for one cycle).
module ace_avf_monitor #(
  parameter int unsigned INTERVAL = 10000,
  parameter int unsigned N_SUB    = 5,
  parameter int unsigned IQ_BITS  = 96 * 40,
  parameter int unsigned AW       = $clog2(IQ_BITS + 1),
  parameter int unsigned THR_W    = 16,
  localparam int unsigned SUB     = INTERVAL / N_SUB,
  localparam int unsigned SW      = $clog2(SUB),
  localparam int unsigned NW      = $clog2(N_SUB),
  localparam int unsigned ACCW    = $clog2(IQ_BITS * INTERVAL + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ace_bits,
  input  logic [THR_W-1:0] rel_thr,
  output logic             sub_tick,
  output logic             interval_end,
  output logic             avf_above_trig,
  output logic             emergency,
  output logic [ACCW-1:0]  interval_acc
);

  localparam int unsigned PW = ACCW + THR_W + 1;

  logic [SW-1:0]    sub_cyc_q;
  logic [NW-1:0]    sub_idx_q;
  logic [ACCW-1:0]  sub_acc_q, int_acc_q, sub_tot, int_tot;
  logic [THR_W-1:0] trig;
  logic             sub_above, int_above;

  assign sub_tick     = (sub_cyc_q == SW'(SUB - 1));
  assign interval_end = sub_tick && (sub_idx_q == NW'(N_SUB - 1));
  assign sub_tot      = sub_acc_q + ACCW'(ace_bits);
  assign int_tot      = int_acc_q + ACCW'(ace_bits);
  assign trig         = THR_W'((32'(rel_thr) * 9) / 10);

  assign sub_above = (PW'(sub_tot) << THR_W) >
                     PW'(PW'(trig) * PW'(SUB) * PW'(IQ_BITS));
  assign int_above = (PW'(int_tot) << THR_W) >
                     PW'(PW'(rel_thr) * PW'(INTERVAL) * PW'(IQ_BITS));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sub_cyc_q      <= '0;
      sub_idx_q      <= '0;
      sub_acc_q      <= '0;
      int_acc_q      <= '0;
      avf_above_trig <= 1'b0;
      emergency      <= 1'b0;
      interval_acc   <= '0;
    end else begin
      emergency <= 1'b0;
      if (sub_tick) begin
        sub_cyc_q      <= '0;
        sub_acc_q      <= '0;
        avf_above_trig <= sub_above;
        if (interval_end) begin
          sub_idx_q    <= '0;
          int_acc_q    <= '0;
          interval_acc <= int_tot;
          emergency    <= int_above;
        end else begin
          sub_idx_q    <= sub_idx_q + NW'(1);
          int_acc_q    <= int_tot;
        end
      end else begin
        sub_cyc_q <= sub_cyc_q + SW'(1);
        sub_acc_q <= sub_tot;
        int_acc_q <= int_tot;
      end
    end
  end

endmodule
