// prra: N-input parallel round-robin arbiter (PRRA).
//
// The arbiter grants at most one of N requests per cell slot (one clk
// cycle) under a rotating priority: the input after the one granted last has
// the highest priority, the granted one the lowest. It is built as a binary
// tree: the N leaves hold a one-hot "head" state, the internal nodes reduce
// requests and head to two-bit subtree codes on the way up, and a single
// grant travels down from the root along one path. Request-to-grant delay
// is therefore O(log N) gate levels with O(N) gates, and the grant is
// round-robin fair for any request pattern: a request that stays up is
// granted within N slots.
//
// Head state, chosen by PROGRAMMABLE:
//   0 (default, the document's main design) - a ring of N leaf flip-flops
//     (prra_lnode); the grant of leaf i sets the head of leaf i+1.
//   1 - the programmable variant the document sketches: encoder, log2(N)-bit
//     register and decoder (prra_prog_head); load/load_idx then force any
//     input to the highest priority. In mode 0 load and load_idx are unused.
//
// Interface: req[i] is input i's request, grant[i] its grant, head[i] the
// current head (one-hot; input 0 after reset). Timing: grant is a
// combinational function of req and the head registers, valid in the same
// cycle; the head moves on the rising clk edge that ends a slot with a grant
// and stays when nothing is granted. rst_n is asynchronous, active low.
module prra #(
  parameter int unsigned N            = 8,
  parameter bit          PROGRAMMABLE = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  output logic [N-1:0]         grant,
  output logic [N-1:0]         head,
  input  logic                 load,
  input  logic [$clog2(N)-1:0] load_idx
);

  logic [N-1:0] tree_r;
  logic [N-1:0] tree_h;
  logic [N-1:0] tree_g;
  logic         any_grant;

  assign any_grant = |tree_g;

  prra_tree #(.N(N)) u_tree (
    .r (tree_r),
    .h (tree_h),
    .g (tree_g)
  );

  if (!PROGRAMMABLE) begin : g_ring
    for (genvar i = 0; i < N; i++) begin : g_leaf
      prra_lnode #(.INIT_HEAD(i == 0)) u_leaf (
        .clk     (clk),
        .rst_n   (rst_n),
        .advance (any_grant),
        .ring_in (tree_g[(i+N-1)%N]),
        .request (req[i]),
        .g       (tree_g[i]),
        .r       (tree_r[i]),
        .h       (tree_h[i]),
        .grant   (grant[i])
      );
    end
  end else begin : g_prog
    logic [$clog2(N)-1:0] head_idx;
    prra_prog_head #(.N(N)) u_head (
      .clk      (clk),
      .rst_n    (rst_n),
      .grant    (tree_g),
      .load     (load),
      .load_idx (load_idx),
      .head_idx (head_idx),
      .h        (tree_h)
    );
    assign tree_r = req;
    assign grant  = tree_g;
  end

  assign head = tree_h;

  // Rules of the arbiter: one head, at most one grant, only to a requester,
  // and some grant whenever something is requested.
  a_head_onehot : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(head));
  a_grant_onehot0 : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant));
  a_grant_req : assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~req) == '0);
  a_work_conserving : assert property (@(posedge clk) disable iff (!rst_n)
    (req != '0) |-> (grant != '0));

endmodule
