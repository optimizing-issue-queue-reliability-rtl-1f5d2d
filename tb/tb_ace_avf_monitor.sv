// tb_ace_avf_monitor: self-checking test of the online AVF estimate.
// Random ACE-bit counts (with a bias that changes per sub-interval so that
// the estimate falls on both sides of the trigger) are summed here; after
// each 2000-cycle sub-interval avf_above_trig must equal
// sum*2^16 > floor(0.9*thr)*2000*IQ_BITS, and after each 10K-cycle interval
// `emergency` must pulse exactly when sum*2^16 > thr*10000*IQ_BITS. The
// positions of sub_tick and interval_end (the sampling rate) are checked too.
module tb_ace_avf_monitor;
  localparam int unsigned INTV = 10000, NS = 5, SUB = INTV / NS;
  localparam int unsigned IQB = 96 * 40;
  localparam int unsigned AW = $clog2(IQB + 1);
  localparam int unsigned ACCW = $clog2(IQB * INTV + 1);
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] ace_bits;
  logic [15:0] rel_thr;
  logic sub_tick, interval_end, avf_above_trig, emergency;
  logic [ACCW-1:0] interval_acc;
  ace_avf_monitor #(.INTERVAL(INTV), .N_SUB(NS), .IQ_BITS(IQB), .AW(AW), .THR_W(16)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, above_seen = 0, below_seen = 0, emerg_seen = 0, calm_seen = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ace_bits = '0; rel_thr = 16'd32768;   // target AVF 0.5
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(avf_above_trig == 0, "reset");
    for (int iv = 0; iv < 20; iv++) begin
      longint isum;
      isum = 0;
      rel_thr = 16'($urandom_range(52000, 13000));
      for (int s = 0; s < NS; s++) begin
        longint ssum;
        int hi;
        bit exp_above;
        ssum = 0;
        hi = $urandom_range(IQB, IQB / 8);
        for (int c = 0; c < SUB; c++) begin
          ace_bits = AW'($urandom_range(hi, 0));
          ssum += ace_bits; isum += ace_bits;
          #1;
          check(sub_tick == (c == SUB - 1), "sub_tick position");
          check(interval_end == (c == SUB - 1 && s == NS - 1), "interval_end position");
          @(posedge clk); #1;
          if (c != SUB - 1) check(emergency == 0, "emergency only at interval end");
        end
        exp_above = (ssum * 65536) > (longint'((rel_thr * 9) / 10) * SUB * IQB);
        check(avf_above_trig == exp_above, $sformatf("iv %0d sub %0d above=%0b exp %0b", iv, s, avf_above_trig, exp_above));
        if (exp_above) above_seen++; else below_seen++;
      end
      begin
        bit exp_em;
        exp_em = (isum * 65536) > (longint'(rel_thr) * INTV * IQB);
        check(emergency == exp_em, $sformatf("iv %0d emergency=%0b exp %0b", iv, emergency, exp_em));
        check(longint'(interval_acc) == isum, "interval_acc");
        if (exp_em) emerg_seen++; else calm_seen++;
      end
    end
    check(above_seen > 0 && below_seen > 0, "trigger seen on both sides");
    check(emerg_seen > 0 && calm_seen > 0, "emergency seen on both sides");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
