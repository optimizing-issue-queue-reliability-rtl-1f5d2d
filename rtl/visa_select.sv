// visa_select: Vulnerable-InStruction-Aware (VISA) issue select.
//
// Every cycle it grants up to `slots` of the ready entries of an N-entry
// issue queue. Ready ACE instructions have priority over ready un-ACE ones:
// a ready ACE instruction bypasses every ready un-ACE instruction, ready ACE
// instructions leave in program order, and ready un-ACE instructions use the
// slots left over, also in program order. That priority order is the
// document's; the circuit is this design's own: each entry computes its rank
// (how many requests of higher priority exist, from an age mask giving the
// entries older than it) and is granted when its rank is below `slots`.
//
// Interface: req_ace / req_unace are request vectors (an entry sets at most
// one of the two), older_mask[i][j] = 1 when entry j is older than entry i.
// rank[i] of a requesting entry is its position in priority order (ranks of
// the requesters are 0..requests-1 without gaps), so a granted entry can be
// steered to issue lane rank[i]. Purely combinational.
module visa_select #(
  parameter int unsigned N = 96,
  parameter int unsigned W = 8,
  localparam int unsigned SW = $clog2(W + 1),
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]          req_ace,
  input  logic [N-1:0]          req_unace,
  input  logic [N-1:0][N-1:0]   older_mask,
  input  logic [SW-1:0]         slots,
  output logic [N-1:0]          grant,
  output logic [N-1:0][CW-1:0]  rank,
  output logic [SW-1:0]         grant_cnt
);

  function automatic logic [CW-1:0] popcount(input logic [N-1:0] v);
    logic [CW-1:0] c;
    c = '0;
    for (int unsigned k = 0; k < N; k++) c += CW'(v[k]);
    return c;
  endfunction

  logic [CW-1:0] n_ace, n_unace, total;

  always_comb begin
    n_ace     = popcount(req_ace);
    n_unace   = popcount(req_unace);
    total     = n_ace + n_unace;
    grant_cnt = (total < CW'(slots)) ? SW'(total) : slots;
  end

  for (genvar i = 0; i < N; i++) begin : g_entry
    always_comb begin
      if (req_ace[i])
        rank[i] = popcount(req_ace & older_mask[i]);
      else
        rank[i] = n_ace + popcount(req_unace & older_mask[i]);
      grant[i] = (req_ace[i] || req_unace[i]) && ({1'b0, rank[i]} < (CW+1)'(slots));
    end
  end

endmodule
