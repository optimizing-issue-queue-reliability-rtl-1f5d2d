// tb_iq_alloc_ctrl: self-checking test of the dynamic IQ allocation cap.
//
// Each 10K-cycle interval the testbench drives commit counts for a chosen IPC
// region and random ready queue lengths, then compares the new cap with
// min(avg RQL + a*96, b*96) computed here for that region. It also checks that
// interval_end comes exactly every INTERVAL cycles and that the cap holds its
// value inside an interval. Every IPC region, both sides of the min and the
// reset value (96) are covered.
module tb_iq_alloc_ctrl;
  localparam int unsigned IQ = 96, INTV = 10000, CMT = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] commit_cnt;
  logic [6:0] rql, iql;
  logic interval_end;

  iq_alloc_ctrl #(.IQ_SIZE(IQ), .INTERVAL(INTV), .COMMIT_W(CMT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_iql(input longint commits, input longint rsum);
    int avg, a, b, s;
    avg = int'(rsum / INTV);
    if      (commits <= 2 * INTV) begin a = IQ / 6;     b = IQ / 3;     end
    else if (commits <= 4 * INTV) begin a = IQ / 3;     b = IQ / 2;     end
    else if (commits <= 6 * INTV) begin a = IQ / 2;     b = 2 * IQ / 3; end
    else                          begin a = 2 * IQ / 3; b = IQ;         end
    s = avg + a;
    return (s < b) ? s : b;
  endfunction

  initial begin
    int regions [12] = '{0, 1, 2, 3, 0, 1, 2, 3, 3, 2, 1, 0};
    int rqlmax  [12] = '{4, 6, 8, 10, 90, 90, 90, 90, 20, 30, 2, 96};
    commit_cnt = 0; rql = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(iql == 7'(IQ), "cap after reset is IQ_SIZE");
    for (int it = 0; it < 12; it++) begin
      longint csum, rsum;
      int prev_cap;
      prev_cap = iql; csum = 0; rsum = 0;
      for (int c = 0; c < INTV; c++) begin
        int lo, hi;
        lo = (regions[it] == 0) ? 0 : 2 * regions[it] + 1;
        hi = (regions[it] == 3) ? 8 : 2 * regions[it] + 2;
        if (regions[it] == 0) hi = 3;  // average below 2
        commit_cnt = 4'($urandom_range(hi, lo));
        if (regions[it] == 0 && commit_cnt == 3) commit_cnt = 0;
        rql = 7'($urandom_range(rqlmax[it], 0));
        csum += commit_cnt; rsum += rql;
        #1;
        check(interval_end == (c == INTV - 1), $sformatf("interval_end at cycle %0d", c));
        if (c % 1000 == 0) check(int'(iql) == prev_cap, "cap stable within interval");
        @(posedge clk); #1;
      end
      check(int'(iql) == exp_iql(csum, rsum),
            $sformatf("interval %0d: iql %0d exp %0d (commits %0d rsum %0d)", it, iql, exp_iql(csum, rsum), csum, rsum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
