// tb_visa_select: self-checking test of the VISA issue select.
//
// Random request patterns over a random dispatch order are checked against a
// reference that lists the requesters ACE first, each class oldest first, and
// grants the first `slots` of that list. Checked: the grant vector, the rank
// of every requester, and the grant count. Directed cases cover a ready ACE
// instruction bypassing older ready un-ACE ones and an empty request set.
module tb_visa_select;
  localparam int unsigned N  = 96;
  localparam int unsigned W  = 8;
  localparam int unsigned SW = $clog2(W + 1);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]         req_ace, req_unace, grant;
  logic [N-1:0][N-1:0]  older_mask;
  logic [N-1:0][CW-1:0] rank;
  logic [SW-1:0]        slots, grant_cnt;

  int checks = 0, failures = 0;
  int age [N];

  visa_select #(.N(N), .W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic shuffle_ages();
    for (int i = 0; i < N; i++) age[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i, 0);
      t = age[i]; age[i] = age[j]; age[j] = t;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) older_mask[i][j] = (age[j] < age[i]);
  endtask

  task automatic check_ref();
    int order[$];
    int exp_rank [N];
    int k;
    // ACE requesters oldest first, then un-ACE requesters oldest first.
    for (int a = 0; a < N; a++)
      for (int i = 0; i < N; i++) if (age[i] == a && req_ace[i]) order.push_back(i);
    for (int a = 0; a < N; a++)
      for (int i = 0; i < N; i++) if (age[i] == a && req_unace[i]) order.push_back(i);
    k = 0;
    foreach (order[p]) exp_rank[order[p]] = p;
    for (int i = 0; i < N; i++) begin
      bit req, exp_g;
      req   = req_ace[i] || req_unace[i];
      exp_g = req && (exp_rank[i] < int'(slots));
      check(grant[i] == exp_g, $sformatf("grant[%0d]=%0b exp %0b", i, grant[i], exp_g));
      if (req) check(int'(rank[i]) == exp_rank[i], $sformatf("rank[%0d]=%0d exp %0d", i, rank[i], exp_rank[i]));
    end
    k = (order.size() < int'(slots)) ? order.size() : int'(slots);
    check(int'(grant_cnt) == k, $sformatf("grant_cnt=%0d exp %0d", grant_cnt, k));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: entries 0..9 dispatched in index order; un-ACE 0..5 ready,
    // ACE 8 and 9 ready; 4 slots -> 8, 9, 0, 1.
    for (int i = 0; i < N; i++) age[i] = i;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) older_mask[i][j] = (j < i);
    req_unace = '0; req_ace = '0;
    for (int i = 0; i < 6; i++) req_unace[i] = 1'b1;
    req_ace[8] = 1'b1; req_ace[9] = 1'b1;
    slots = 4;
    #1;
    check(grant[8] && grant[9] && grant[0] && grant[1] && !grant[2], "ACE bypasses older un-ACE");
    check(rank[8] == 0 && rank[9] == 1 && rank[0] == 2, "ACE issued in program order first");
    check_ref();
    req_ace = '0; req_unace = '0; #1;
    check(grant == '0 && grant_cnt == 0, "no requests, no grants");

    for (int it = 0; it < 300; it++) begin
      int dens;
      shuffle_ages();
      dens = $urandom_range(100, 1);
      for (int i = 0; i < N; i++) begin
        bit r;
        r = ($urandom_range(99, 0) < dens);
        req_ace[i]   = r && $urandom_range(1, 0);
        req_unace[i] = r && !req_ace[i];
      end
      slots = SW'($urandom_range(W, 0));
      #1;
      check_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
