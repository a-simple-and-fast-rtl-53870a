// prra_lnode: leaf node of the parallel round-robin arbiter, one per
// request input.
//
// Each leaf holds one Head flip-flop. Exactly one Head in the ring is 1; the
// leaf that holds it has the highest priority, and priority falls off in
// ring order after it. The leaves are chained in a ring: the grant of leaf
// i-1 is this leaf's ring input. When any grant is issued in a cell slot,
// every Head takes its ring input at the end of the slot, so the leaf after
// the granted one becomes the head and the old head is cleared; with no
// grant every Head keeps its value. This is the document's set/reset rule
// for the Head flip-flops, realised as a clocked flip-flop with an enable.
// The leaf passes its request up to the tree and returns the tree's grant
// to the requester.
//
// Interface: request/grant to the input port it serves; r, h up to and g
// down from its type-1 parent; ring_in from the previous leaf's grant;
// advance = OR of all grants. Timing: grant follows request combinationally
// in the same cycle; h changes on the next rising clk edge. INIT_HEAD is the
// reset value (1 only for leaf 0, as in the document).
module prra_lnode #(
  parameter bit INIT_HEAD = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic advance,
  input  logic ring_in,
  input  logic request,
  input  logic g,
  output logic r,
  output logic h,
  output logic grant
);

  logic head_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       head_q <= INIT_HEAD;
    else if (advance) head_q <= ring_in;
  end

  always_comb begin
    r     = request;
    h     = head_q;
    grant = g;
  end

endmodule
