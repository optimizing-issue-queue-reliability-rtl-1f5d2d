// tb_dispatch_gate: self-checking test of the dispatch gate. For random
// occupancy, cap, FLUSH mode, stall masks and scheme, the dispatch limit and
// thread enables are compared with the rules: OPT2 uses max(IQL - occupancy,
// 0) outside FLUSH intervals and the free entries inside them, with FLUSH
// stalls; DVM uses the free entries and DVM's enables.
module tb_dispatch_gate;
  import iq_pkg::*;
  logic [6:0] occupancy, iql, disp_limit;
  scheme_e scheme;
  logic flush_mode;
  logic [3:0] flush_stalled, dvm_en, thread_en, fetch_eligible;
  dispatch_gate dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int it = 0; it < 4000; it++) begin
      int cap, lim;
      logic [3:0] en;
      occupancy = 7'($urandom_range(96, 0));
      iql = 7'($urandom_range(96, 0));
      scheme = scheme_e'($urandom_range(1, 0));
      flush_mode = $urandom_range(1, 0);
      flush_stalled = 4'($urandom); dvm_en = 4'($urandom);
      if (scheme == SCHEME_OPT2) begin
        cap = flush_mode ? 96 : int'(iql);
        en = ~flush_stalled;
      end else begin
        cap = 96; en = dvm_en;
      end
      lim = (cap > int'(occupancy)) ? cap - int'(occupancy) : 0;
      #1;
      check(int'(disp_limit) == lim, $sformatf("limit %0d exp %0d", disp_limit, lim));
      check(thread_en == en && fetch_eligible == en, "thread enables");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
