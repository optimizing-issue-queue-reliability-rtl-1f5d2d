// tb_icount_select: self-checking test of ICOUNT thread selection. Random
// in-flight counts (often tied) and eligibility masks are checked against a
// linear search for the eligible thread with the fewest in-flight
// instructions, lowest index on ties.
module tb_icount_select;
  localparam int NT = 4, CW = 9;
  logic [NT-1:0][CW-1:0] inflight;
  logic [NT-1:0] eligible;
  logic sel_valid;
  logic [1:0] sel_tid;
  icount_select #(.N_THREADS(NT), .CNT_W(CW)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int it = 0; it < 3000; it++) begin
      int best;
      best = -1;
      for (int t = 0; t < NT; t++) begin
        inflight[t] = CW'(it % 3 == 0 ? $urandom_range(3, 0) : $urandom_range(384, 0));
        eligible[t] = $urandom_range(3, 0) != 0;
      end
      for (int t = 0; t < NT; t++)
        if (eligible[t] && (best < 0 || inflight[t] < inflight[best])) best = t;
      #1;
      checks++;
      if (sel_valid != (best >= 0) || (best >= 0 && int'(sel_tid) != best)) begin
        failures++;
        if (failures < 10) $display("FAIL: sel %0b/%0d exp %0d", sel_valid, sel_tid, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
