// prra_tree: combinational arbitration tree of the parallel round-robin
// arbiter for N = 2**n request inputs (N >= 4).
//
// The tree is a complete binary tree of log2(N)+1 levels. Level log2(N)
// holds the N leaves (outside this module: r and h come from them, g goes
// back to them), level log2(N)-1 the type-1 nodes, levels 1 to log2(N)-2 the
// type-2 nodes and level 0 the root. Codes {S1,S0} travel up, the grant
// travels down: the root sends a 1 into exactly one half, every node on the
// way passes it into exactly one child, and the type-1 node that receives it
// grants one requesting leaf. The path is log2(N) nodes up and log2(N)
// nodes down, so the delay from request to grant grows as log2(N) and the
// node count is N-1.
//
// Nodes are numbered as a heap: the root is 1, the children of node j are
// 2j and 2j+1, and leaf i is node N+i, so leaf 0 is the leftmost and ring
// order runs left to right. gn[j] is the grant into node j from its parent,
// sc[j] the code node j sends up.
//
// Interface: r request of each leaf, h head of each leaf (one-hot), g grant
// of each leaf (at most one set; none when no request). No clock.
module prra_tree
  import prra_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] r,
  input  logic [N-1:0] h,
  output logic [N-1:0] g
);

  localparam int unsigned LOGN = $clog2(N);

  if (N < 4 || (1 << LOGN) != N) begin : g_bad_n
    $error("prra_tree: N must be a power of two and at least 4");
  end

  logic   gn [2:2*N-1];
  scode_t sc [2:N-1];

  // type-1 nodes: heap indices N/2 .. N-1, children are leaves
  for (genvar j = N/2; j < N; j++) begin : g_i1
    prra_i1node u_i1 (
      .r_l (r[2*j-N]),
      .h_l (h[2*j-N]),
      .r_r (r[2*j+1-N]),
      .h_r (h[2*j+1-N]),
      .g   (gn[j]),
      .s   (sc[j]),
      .g_l (gn[2*j]),
      .g_r (gn[2*j+1])
    );
  end

  // type-2 nodes: heap indices 2 .. N/2-1 (none for N = 4)
  for (genvar j = 2; j < N/2; j++) begin : g_i2
    prra_i2node u_i2 (
      .s_l (sc[2*j]),
      .s_r (sc[2*j+1]),
      .g   (gn[j]),
      .s   (sc[j]),
      .g_l (gn[2*j]),
      .g_r (gn[2*j+1])
    );
  end

  prra_rnode u_root (
    .s_l (sc[2]),
    .s_r (sc[3]),
    .g_l (gn[2]),
    .g_r (gn[3])
  );

  for (genvar i = 0; i < N; i++) begin : g_out
    assign g[i] = gn[N+i];
  end

endmodule
